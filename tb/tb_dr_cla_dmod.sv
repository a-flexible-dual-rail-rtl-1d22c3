// tb_dr_cla_dmod: every pair of (kill, generate, propagate) codes and both
// carry-in values into the D module; checks the merged code, the returned
// carry, and that a kill or generate in the lower group gives the carry
// before the carry-in is known.
module tb_dr_cla_dmod;
  int checks = 0, failures = 0;
  `include "tb_watchdog.svh"

  logic hk, hg, hp, lk, lg, lp, ck_t, ck_f, ok, og, op, cj_t, cj_f;

  dr_cla_dmod dut (.*);

  initial begin
    {hk, hg, hp, lk, lg, lp, ck_t, ck_f} = '0;
    #1;
    for (int h = 0; h < 3; h++)
      for (int l = 0; l < 3; l++)
        for (int c = 0; c < 2; c++) begin
          logic ek, eg, ep, ec;
          {hk, hg, hp} = 3'b100 >> h;
          {lk, lg, lp} = 3'b100 >> l;
          #1;
          ep = (h == 2) && (l == 2);
          ek = (h == 0) || ((h == 2) && (l == 0));
          eg = (h == 1) || ((h == 2) && (l == 1));
          check({ok, og, op} == {ek, eg, ep}, $sformatf("code h=%0d l=%0d", h, l));
          if (l == 2) check(!cj_t && !cj_f, "carry before carry-in on propagate");
          else        check(cj_t == (l == 1) && cj_f == (l == 0), "early carry");
          {ck_t, ck_f} = c ? 2'b10 : 2'b01;
          #1;
          ec = (l == 1) || ((l == 2) && c == 1);
          check(cj_t == ec && cj_f == !ec, $sformatf("carry h=%0d l=%0d c=%0d", h, l, c));
          {hk, hg, hp, lk, lg, lp, ck_t, ck_f} = '0;
          #1;
          check({ok, og, op, cj_t, cj_f} == '0, "not empty");
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
