// dr_cla_cmod: the per-bit "C module" of the delay-insensitive carry-lookahead
// adder, W bits side by side.
//
// From the dual-rail operand bits A_i, B_i it forms the one-hot internal code
// I_i = (k_i, g_i, p_i): kill k = A0B0, generate g = A1B1, propagate
// p = A0B1 + A1B0 (products are C-elements). Once the dual-rail carry C_i
// into the bit arrives it forms the sum with the minterm equations
//   S0 = A0B0C0 + A1B1C0 + A0B1C1 + A1B0C1,  S1 = A1B1C1 + A1B0C0 + A0B1C0 + A0B0C1
// (superscript 0/1 = false/true rail). The (k,g,p) code goes down the tree of
// D modules, which return the carry.
//
// Interface: a, b, c (dual-rail) in; s (dual-rail) and k, g, p out.
// Timing: k/g/p valid after A and B are; s valid after A, B and C are.
module dr_cla_cmod #(
  parameter int unsigned W = 1
) (
  input  logic [W-1:0] a_t, a_f,
  input  logic [W-1:0] b_t, b_f,
  input  logic [W-1:0] c_t, c_f,
  output logic [W-1:0] s_t, s_f,
  output logic [W-1:0] k, g, p
);

  logic [W-1:0] p01, p10;
  logic [7:0][W-1:0] m;   // m[k]: minterm A = k[2], B = k[1], C = k[0]

  c_element #(.N(2), .W(W)) u_k   (.in({a_f, b_f}), .y(k));
  c_element #(.N(2), .W(W)) u_g   (.in({a_t, b_t}), .y(g));
  c_element #(.N(2), .W(W)) u_p01 (.in({a_f, b_t}), .y(p01));
  c_element #(.N(2), .W(W)) u_p10 (.in({a_t, b_f}), .y(p10));
  assign p = p01 | p10;

  for (genvar n = 0; n < 8; n++) begin : g_min
    c_element #(.N(3), .W(W)) u_c (
      .in({(n & 4) != 0 ? a_t : a_f,
           (n & 2) != 0 ? b_t : b_f,
           (n & 1) != 0 ? c_t : c_f}),
      .y (m[n])
    );
  end

  assign s_f = m[0] | m[6] | m[3] | m[5];
  assign s_t = m[7] | m[4] | m[2] | m[1];

endmodule
