// tb_dr_cla_adder: 32-bit DI carry-lookahead adder at its default width.
// Corner cases (full carry chain, all kills, all generates) and random
// operands with both carry-in values; checks sum and carry-out, that nothing
// is complete before the carry-in is valid on a full propagate chain, and the
// return to empty.
module tb_dr_cla_adder;
  int checks = 0, failures = 0;
  `include "tb_watchdog.svh"

  localparam int W = 32;
  logic [W-1:0] a_t, a_f, b_t, b_f, s_t, s_f;
  logic ci_t, ci_f, co_t, co_f, done;

  dr_cla_adder dut (.*);

  task automatic one(input logic [W-1:0] a, input logic [W-1:0] b, input logic ci);
    logic [W:0] e;
    e = {1'b0, a} + {1'b0, b} + (W+1)'(ci);
    a_t = a; a_f = ~a; b_t = b; b_f = ~b;
    #1;
    if ((a ^ b) == '1) check(!s_t[W-1] && !s_f[W-1] && !co_t && !co_f, "propagate chain finished without carry-in");
    check(!done, "done before carry-in");
    ci_t = ci; ci_f = !ci;
    #1;
    check(done, "done did not rise");
    check(s_t == e[W-1:0] && s_f == ~e[W-1:0], $sformatf("%h+%h+%0d got %h exp %h", a, b, ci, s_t, e[W-1:0]));
    check(co_t == e[W] && co_f == !e[W], $sformatf("carry %h+%h+%0d", a, b, ci));
    {a_t, a_f, b_t, b_f, ci_t, ci_f} = '0;
    #1;
    check((s_t | s_f) == '0 && !co_t && !co_f && !done, "not empty");
  endtask

  initial begin
    {a_t, a_f, b_t, b_f, ci_t, ci_f} = '0;
    #1;
    one('1, '0, 1'b1);
    one(32'hAAAA_AAAA, 32'h5555_5555, 1'b0);
    one('0, '0, 1'b0);
    one('1, '1, 1'b1);
    one(32'd213, 32'd31104, 1'b0);
    for (int i = 0; i < 2000; i++) one($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
