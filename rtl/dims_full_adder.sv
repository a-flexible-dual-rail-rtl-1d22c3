// dims_full_adder: W independent dual-rail full adders (DIMS).
//
// Each bit has eight 3-input C-elements, one per minterm of (A, B, Cin).
// The sum and carry rails are ORs of minterms, i.e. the sum-of-products
// equations of the design's DI full adder:
//   Cout0 = A0B0 + A0Cin0 + B0Cin0, Cout1 = A1B1 + A1Cin1 + B1Cin1,
//   S0    = parity-even minterms,   S1    = parity-odd minterms,
// where a superscript 0/1 names the false/true rail. Written with full
// minterms, every output waits for all three inputs (strict DIMS), which is
// what lets the adder array signal completion from its outputs alone.
//
// Interface: a, b, ci (dual-rail, bit-wise) in; s, co (dual-rail) out.
// Timing: outputs valid after all inputs valid, empty after all empty.
module dims_full_adder #(
  parameter int unsigned W = 1
) (
  input  logic [W-1:0] a_t, a_f,
  input  logic [W-1:0] b_t, b_f,
  input  logic [W-1:0] ci_t, ci_f,
  output logic [W-1:0] s_t, s_f,
  output logic [W-1:0] co_t, co_f
);

  // m[k]: minterm with A = k[2], B = k[1], Cin = k[0]
  logic [7:0][W-1:0] m;

  for (genvar k = 0; k < 8; k++) begin : g_min
    c_element #(.N(3), .W(W)) u_c (
      .in({(k & 4) != 0 ? a_t  : a_f,
           (k & 2) != 0 ? b_t  : b_f,
           (k & 1) != 0 ? ci_t : ci_f}),
      .y (m[k])
    );
  end

  assign s_f  = m[0] | m[3] | m[5] | m[6];
  assign s_t  = m[1] | m[2] | m[4] | m[7];
  assign co_f = m[0] | m[1] | m[2] | m[4];
  assign co_t = m[3] | m[5] | m[6] | m[7];

endmodule
