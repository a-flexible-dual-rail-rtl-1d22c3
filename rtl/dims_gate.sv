// dims_gate: W parallel two-input dual-rail gates (AND, OR or XOR) built by
// Delay-Insensitive Minterm Synthesis.
//
// For each bit, four 2-input C-elements detect the four input minterms
// (a=0,b=0), (a=0,b=1), (a=1,b=0), (a=1,b=1). Exactly one of them fires once
// both inputs are valid, and OR gates collect the minterms into the true and
// false output rails according to the truth table of OP. When both inputs
// return to empty the fired C-element falls and the output is empty again.
// The AND gate is the one drawn in the design; OR and XOR differ only in how
// the minterms are grouped onto the two rails.
//
// Interface: a_t/a_f, b_t/b_f are the inputs, y_t/y_f the output, bit-wise.
// Timing: combinational with C-element state; the output becomes valid only
// after both inputs are valid and empty only after both are empty.
module dims_gate
  import dr_pkg::*;
#(
  parameter int unsigned W  = 1,
  parameter dims_op_e    OP = DIMS_AND
) (
  input  logic [W-1:0] a_t, a_f,
  input  logic [W-1:0] b_t, b_f,
  output logic [W-1:0] y_t, y_f
);

  logic [W-1:0] m00, m01, m10, m11;

  c_element #(.N(2), .W(W)) u_m00 (.in({a_f, b_f}), .y(m00));
  c_element #(.N(2), .W(W)) u_m01 (.in({a_f, b_t}), .y(m01));
  c_element #(.N(2), .W(W)) u_m10 (.in({a_t, b_f}), .y(m10));
  c_element #(.N(2), .W(W)) u_m11 (.in({a_t, b_t}), .y(m11));

  always_comb begin
    unique case (OP)
      DIMS_AND: begin y_t = m11;             y_f = m00 | m01 | m10; end
      DIMS_OR:  begin y_t = m01 | m10 | m11; y_f = m00;             end
      default:  begin y_t = m01 | m10;       y_f = m00 | m11;       end
    endcase
  end

endmodule
