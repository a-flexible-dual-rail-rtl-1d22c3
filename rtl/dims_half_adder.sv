// dims_half_adder: W independent dual-rail half adders (DIMS).
//
// The full adder with its carry input fixed to a valid 0, simplified: a
// constant valid 0 cannot enter a C-element (its false rail would be stuck
// high and the gate could never return to empty), so the four minterms of
// (A, B) are detected directly. Used at the edges of the multiplier array
// where an adder has only two inputs.
//
// Interface: a, b in; s, co out (dual-rail, bit-wise).
// Timing: outputs valid after both inputs valid, empty after both empty.
module dims_half_adder #(
  parameter int unsigned W = 1
) (
  input  logic [W-1:0] a_t, a_f,
  input  logic [W-1:0] b_t, b_f,
  output logic [W-1:0] s_t, s_f,
  output logic [W-1:0] co_t, co_f
);

  logic [W-1:0] m00, m01, m10, m11;

  c_element #(.N(2), .W(W)) u_m00 (.in({a_f, b_f}), .y(m00));
  c_element #(.N(2), .W(W)) u_m01 (.in({a_f, b_t}), .y(m01));
  c_element #(.N(2), .W(W)) u_m10 (.in({a_t, b_f}), .y(m10));
  c_element #(.N(2), .W(W)) u_m11 (.in({a_t, b_t}), .y(m11));

  assign s_t  = m01 | m10;
  assign s_f  = m00 | m11;
  assign co_t = m11;
  assign co_f = m00 | m01 | m10;

endmodule
