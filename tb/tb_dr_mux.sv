// tb_dr_mux: the dual-rail 2:1 multiplexer passes the selected input once
// select and that input are valid, ignores the other input, and empties.
module tb_dr_mux;
  int checks = 0, failures = 0;
  `include "tb_watchdog.svh"

  localparam int W = 8;
  logic [W-1:0] in0_t, in0_f, in1_t, in1_f, y_t, y_f;
  logic sel_t, sel_f;

  dr_mux #(.W(W)) dut (.*);

  initial begin
    {in0_t, in0_f, in1_t, in1_f, sel_t, sel_f} = '0;
    #1;
    for (int i = 0; i < 300; i++) begin
      logic [W-1:0] v0, v1, e;
      logic s;
      v0 = W'($urandom); v1 = W'($urandom); s = 1'($urandom);
      e = s ? v1 : v0;
      sel_t = s; sel_f = !s;
      #1;
      check((y_t | y_f) == '0, "output before data");
      if (s) begin in1_t = v1; in1_f = ~v1; end
      else   begin in0_t = v0; in0_f = ~v0; end
      #1;
      check(y_t == e && y_f == ~e, $sformatf("sel=%0d got %h exp %h", s, y_t, e));
      if (s) begin in0_t = v0; in0_f = ~v0; end
      else   begin in1_t = v1; in1_f = ~v1; end
      #1;
      check(y_t == e && y_f == ~e, "unselected input disturbed the output");
      {in0_t, in0_f, in1_t, in1_f, sel_t, sel_f} = '0;
      #1;
      check((y_t | y_f) == '0, "not empty");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
