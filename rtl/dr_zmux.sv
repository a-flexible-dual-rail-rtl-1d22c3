// dr_zmux: dual-rail 2:1 multiplexer whose input 0 is the constant 0.
//
// The general multiplexer with a constant valid 0 on input 0, simplified: a
// constant rail cannot feed a C-element (the gate could never return to
// empty), so the false output rail takes the select's false rail directly.
// Used by the shifters for their fill bits (zero or sign / rotated bit).
//
// Interface: x (dual-rail) is input 1, sel (dual-rail) the select; y out.
// Timing: valid once sel (and, if sel = 1, x) is valid; empty likewise.
module dr_zmux (
  input  logic x_t, x_f,
  input  logic sel_t, sel_f,
  output logic y_t, y_f
);

  logic c1f;

  c_element #(.N(2), .W(1)) u_c1t (.in({x_t, sel_t}), .y(y_t));
  c_element #(.N(2), .W(1)) u_c1f (.in({x_f, sel_t}), .y(c1f));

  assign y_f = sel_f | c1f;

endmodule
