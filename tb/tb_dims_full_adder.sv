// tb_dims_full_adder: all eight input combinations (and random 8-bit-wide
// vectors) of the DIMS full adder through the 4-phase cycle, including the
// worked example A=1, B=0, Cin=1 -> Cout=1, S=0.
module tb_dims_full_adder;
  int checks = 0, failures = 0;
  `include "tb_watchdog.svh"

  localparam int W = 8;
  logic [W-1:0] a_t, a_f, b_t, b_f, c_t, c_f, s_t, s_f, co_t, co_f;

  dims_full_adder #(.W(W)) dut (.a_t, .a_f, .b_t, .b_f, .ci_t(c_t), .ci_f(c_f), .s_t, .s_f, .co_t, .co_f);

  initial begin
    logic [W-1:0] a, b, c, s, co;
    {a_t, a_f, b_t, b_f, c_t, c_f} = '0;
    #1;
    for (int i = 0; i < 200; i++) begin
      a = W'($urandom); b = W'($urandom); c = W'($urandom);
      if (i == 0) begin a = '1; b = '0; c = '1; end
      if (i < 8 && i > 0) begin a = {W{i[2]}}; b = {W{i[1]}}; c = {W{i[0]}}; end
      s = a ^ b ^ c; co = (a & b) | (a & c) | (b & c);
      a_t = a; a_f = ~a; b_t = b; b_f = ~b;
      #1;
      check((s_t | s_f | co_t | co_f) == '0, "output before carry-in");
      c_t = c; c_f = ~c;
      #1;
      check(s_t == s && s_f == ~s, $sformatf("sum a=%h b=%h c=%h got %h", a, b, c, s_t));
      check(co_t == co && co_f == ~co, $sformatf("carry a=%h b=%h c=%h got %h", a, b, c, co_t));
      {a_t, a_f, b_t, b_f, c_t, c_f} = '0;
      #1;
      check((s_t | s_f | co_t | co_f) == '0, "not empty");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
