// tb_dr_demux: a branch passes its dual-rail word only while its select wire
// is high; a branch whose select stays low stays empty.
module tb_dr_demux;
  int checks = 0, failures = 0;
  `include "tb_watchdog.svh"

  localparam int W = 16;
  logic [W-1:0] in_t, in_f, y0_t, y0_f, y1_t, y1_f;
  logic sel_t, sel_f;

  dr_demux #(.W(W)) u_0 (.in_t, .in_f, .sel(sel_f), .y_t(y0_t), .y_f(y0_f));
  dr_demux #(.W(W)) u_1 (.in_t, .in_f, .sel(sel_t), .y_t(y1_t), .y_f(y1_f));

  initial begin
    {in_t, in_f, sel_t, sel_f} = '0;
    #1;
    for (int i = 0; i < 300; i++) begin
      logic [W-1:0] v;
      logic s;
      v = W'($urandom); s = 1'($urandom);
      in_t = v; in_f = ~v;
      #1;
      check((y0_t | y0_f | y1_t | y1_f) == '0, "output before select");
      sel_t = s; sel_f = !s;
      #1;
      if (s) check(y1_t == v && y1_f == ~v && (y0_t | y0_f) == '0, "branch 1");
      else   check(y0_t == v && y0_f == ~v && (y1_t | y1_f) == '0, "branch 0");
      {in_t, in_f, sel_t, sel_f} = '0;
      #1;
      check((y0_t | y0_f | y1_t | y1_f) == '0, "not empty");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
