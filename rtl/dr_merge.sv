// dr_merge: merges N dual-rail words of which at most one is non-empty.
//
// A plain OR of the corresponding rails. Because the demultiplexer in front
// lets only one branch carry data, the OR passes that branch's word through
// unchanged and needs no select.
//
// Interface: in[n] (W-bit dual-rail, n = 0..N-1) in; y out.
// Timing: purely combinational.
module dr_merge #(
  parameter int unsigned W = 32,
  parameter int unsigned N = 2
) (
  input  logic [N-1:0][W-1:0] in_t, in_f,
  output logic [W-1:0]        y_t, y_f
);

  always_comb begin
    y_t = '0;
    y_f = '0;
    for (int n = 0; n < N; n++) begin
      y_t |= in_t[n];
      y_f |= in_f[n];
    end
  end

endmodule
