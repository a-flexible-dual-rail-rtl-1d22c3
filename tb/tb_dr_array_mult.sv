// tb_dr_array_mult: 16x16 dual-rail array multiplier at its default size.
// Products of corner operands (0, 1, all ones), the example 216 x 144 and
// random operands; checks that no product bit appears while the multiplier
// operand is empty and that the product returns to empty.
module tb_dr_array_mult;
  int checks = 0, failures = 0;
  `include "tb_watchdog.svh"

  localparam int N = 16;
  logic [N-1:0]   x_t, x_f, y_t, y_f;
  logic [2*N-1:0] p_t, p_f;
  logic           done;

  dr_array_mult dut (.*);

  task automatic one(input logic [N-1:0] x, input logic [N-1:0] y);
    logic [2*N-1:0] e;
    e = (2*N)'(x) * (2*N)'(y);
    x_t = x; x_f = ~x;
    #1;
    check((p_t | p_f) == '0 && !done, "product bits before y valid");
    y_t = y; y_f = ~y;
    #1;
    check(p_t == e && p_f == ~e, $sformatf("%0d*%0d got %0d exp %0d", x, y, p_t, e));
    check(done, "done did not rise");
    x_t = '0; x_f = '0;
    #1;
    check(done, "done fell while y still valid");
    {x_t, x_f, y_t, y_f} = '0;
    #1;
    check((p_t | p_f) == '0 && !done, "not empty");
  endtask

  initial begin
    {x_t, x_f, y_t, y_f} = '0;
    #1;
    one(16'd216, 16'd144);
    one('1, '1);
    one('0, '1);
    one(16'd1, 16'hFFFF);
    for (int i = 0; i < 1500; i++) one(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
