// tb_dr_cla_cmod: the C module's kill/generate/propagate code for every
// operand pair, and its sum once the carry arrives, through the 4-phase cycle.
module tb_dr_cla_cmod;
  int checks = 0, failures = 0;
  `include "tb_watchdog.svh"

  localparam int W = 4;
  logic [W-1:0] a_t, a_f, b_t, b_f, c_t, c_f, s_t, s_f, k, g, p;

  dr_cla_cmod #(.W(W)) dut (.a_t, .a_f, .b_t, .b_f, .c_t, .c_f, .s_t, .s_f, .k, .g, .p);

  initial begin
    logic [W-1:0] a, b, c, s;
    {a_t, a_f, b_t, b_f, c_t, c_f} = '0;
    #1;
    for (int i = 0; i < 200; i++) begin
      a = W'($urandom); b = W'($urandom); c = W'($urandom);
      s = a ^ b ^ c;
      a_t = a; a_f = ~a; b_t = b; b_f = ~b;
      #1;
      check(k == (~a & ~b) && g == (a & b) && p == (a ^ b), $sformatf("kgp a=%h b=%h", a, b));
      check((s_t | s_f) == '0, "sum before carry");
      c_t = c; c_f = ~c;
      #1;
      check(s_t == s && s_f == ~s, $sformatf("sum a=%h b=%h c=%h", a, b, c));
      {a_t, a_f, b_t, b_f, c_t, c_f} = '0;
      #1;
      check((s_t | s_f | k | g | p) == '0, "not empty");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
