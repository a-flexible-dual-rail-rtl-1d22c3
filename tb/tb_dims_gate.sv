// tb_dims_gate: exhaustive and random 4-phase tests of the DIMS AND, OR and
// XOR gates: outputs stay empty while an input is empty, become the correct
// valid value when both are valid, and return to empty.
module tb_dims_gate;
  import dr_pkg::*;
  int checks = 0, failures = 0;
  `include "tb_watchdog.svh"

  localparam int W = 8;
  logic [W-1:0] a_t, a_f, b_t, b_f;
  logic [2:0][W-1:0] y_t, y_f;

  dims_gate #(.W(W), .OP(DIMS_AND)) u_and (.a_t, .a_f, .b_t, .b_f, .y_t(y_t[0]), .y_f(y_f[0]));
  dims_gate #(.W(W), .OP(DIMS_OR))  u_or  (.a_t, .a_f, .b_t, .b_f, .y_t(y_t[1]), .y_f(y_f[1]));
  dims_gate #(.W(W), .OP(DIMS_XOR)) u_xor (.a_t, .a_f, .b_t, .b_f, .y_t(y_t[2]), .y_f(y_f[2]));

  initial begin
    logic [W-1:0] a, b;
    logic [2:0][W-1:0] e;
    a_t = '0; a_f = '0; b_t = '0; b_f = '0;
    #1;
    for (int i = 0; i < 300; i++) begin
      a = W'($urandom); b = W'($urandom);
      if (i < 4) begin a = {W/2{i[1:0]}}; b = {W/2{i[1:0] ^ 2'b01}}; end
      e[0] = a & b; e[1] = a | b; e[2] = a ^ b;
      a_t = a; a_f = ~a;
      #1;
      for (int g = 0; g < 3; g++)
        check(y_t[g] == '0 && y_f[g] == '0, $sformatf("gate %0d fired with b empty", g));
      b_t = b; b_f = ~b;
      #1;
      for (int g = 0; g < 3; g++)
        check(y_t[g] == e[g] && y_f[g] == ~e[g], $sformatf("gate %0d a=%h b=%h got %h/%h", g, a, b, y_t[g], y_f[g]));
      a_t = '0; a_f = '0;
      #1;
      for (int g = 0; g < 3; g++)
        check(y_t[g] == e[g] && y_f[g] == ~e[g], $sformatf("gate %0d lost value early", g));
      b_t = '0; b_f = '0;
      #1;
      for (int g = 0; g < 3; g++)
        check(y_t[g] == '0 && y_f[g] == '0, $sformatf("gate %0d not empty", g));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
