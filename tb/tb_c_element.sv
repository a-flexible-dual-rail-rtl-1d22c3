// tb_c_element: checks the C-element truth table (rise on all-ones, fall on
// all-zeros, hold otherwise) for 2- and 3-input, 4-bit-wide instances,
// against a software model with its own state.
module tb_c_element;
  int checks = 0, failures = 0;
  `include "tb_watchdog.svh"

  logic [1:0][3:0] in2;
  logic [2:0][3:0] in3;
  logic [3:0]      y2, y3, m2, m3;

  c_element #(.N(2), .W(4)) dut2 (.in(in2), .y(y2));
  c_element #(.N(3), .W(4)) dut3 (.in(in3), .y(y3));

  initial begin
    in2 = '0; in3 = '0; m2 = '0; m3 = '0;
    #1;
    check(y2 == 4'h0 && y3 == 4'h0, "reset to 0 on all-zero inputs");
    for (int i = 0; i < 400; i++) begin
      in2 = 8'($urandom);
      in3 = 12'($urandom);
      if (i % 4 == 0) in2[1] = in2[0];       // force agreement often
      if (i % 4 == 1) begin in3[1] = in3[0]; in3[2] = in3[0]; end
      for (int b = 0; b < 4; b++) begin
        if (in2[0][b] & in2[1][b]) m2[b] = 1'b1;
        else if (!(in2[0][b] | in2[1][b])) m2[b] = 1'b0;
        if (in3[0][b] & in3[1][b] & in3[2][b]) m3[b] = 1'b1;
        else if (!(in3[0][b] | in3[1][b] | in3[2][b])) m3[b] = 1'b0;
      end
      #1;
      check(y2 == m2, $sformatf("2-input: in=%b got %b exp %b", in2, y2, m2));
      check(y3 == m3, $sformatf("3-input: in=%b got %b exp %b", in3, y3, m3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
