// c_element: N-input Muller C-element, W bits side by side.
//
// Each output bit rises when all N of its inputs are 1, falls when all are 0,
// and otherwise keeps its value. It is the state-holding element of every
// dual-rail gate in this design (DIMS minterms, demultiplexers, multiplexers,
// completion detectors). The truth table follows the classic definition of
// the C-element; the transistor-level keeper is replaced here by a level
// latch whose enable is "all inputs agree", which is the same behaviour in
// a zero-delay model. The latch is intended: it is the circuit, not an
// accident of coding. No reset: an output settles to 0 as soon as all of its
// inputs are 0, which is the empty state every user of this design starts in.
//
// Interface: in[n][i] is input n of bit i; y[i] is the output of bit i.
// Timing: none beyond the latch; the output follows in the same delta cycle.
module c_element #(
  parameter int unsigned N = 2,
  parameter int unsigned W = 1
) (
  input  logic [N-1:0][W-1:0] in,
  output logic [W-1:0]        y
);

  for (genvar i = 0; i < W; i++) begin : g_bit
    logic [N-1:0] col;
    logic         st;
    for (genvar n = 0; n < N; n++) begin : g_col
      assign col[n] = in[n][i];
    end
    always_latch begin
      if (&col)       st = 1'b1;
      else if (~|col) st = 1'b0;
    end
    assign y[i] = st;
  end

endmodule
