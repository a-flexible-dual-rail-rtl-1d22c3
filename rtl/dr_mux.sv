// dr_mux: W-bit dual-rail 2:1 multiplexer with one dual-rail select.
//
// Per rail and bit, one C-element joins input 0 with the select's false rail
// and another joins input 1 with its true rail; an OR gate merges the two.
// Only the selected C-element can fire, so the output is valid once the
// select and the chosen input are valid, and empty once they are empty again
// (the unchosen input is ignored).
//
// Interface: in0, in1 (W-bit dual-rail), sel (dual-rail) in; y out.
// Timing: combinational with C-element state.
module dr_mux #(
  parameter int unsigned W = 1
) (
  input  logic [W-1:0] in0_t, in0_f,
  input  logic [W-1:0] in1_t, in1_f,
  input  logic         sel_t, sel_f,
  output logic [W-1:0] y_t, y_f
);

  logic [W-1:0] c0t, c0f, c1t, c1f;

  c_element #(.N(2), .W(W)) u_c0t (.in({in0_t, {W{sel_f}}}), .y(c0t));
  c_element #(.N(2), .W(W)) u_c0f (.in({in0_f, {W{sel_f}}}), .y(c0f));
  c_element #(.N(2), .W(W)) u_c1t (.in({in1_t, {W{sel_t}}}), .y(c1t));
  c_element #(.N(2), .W(W)) u_c1f (.in({in1_f, {W{sel_t}}}), .y(c1f));

  assign y_t = c0t | c1t;
  assign y_f = c0f | c1f;

endmodule
