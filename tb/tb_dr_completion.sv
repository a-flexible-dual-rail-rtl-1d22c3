// tb_dr_completion: DoneReset rises only when every bit of the word is valid
// and falls only when every bit is empty again, with bits arriving and
// leaving one at a time in random order.
module tb_dr_completion;
  int checks = 0, failures = 0;
  `include "tb_watchdog.svh"

  localparam int W = 32;
  logic [W-1:0] d_t, d_f;
  logic done_reset;

  dr_completion dut (.d_t, .d_f, .done_reset);

  initial begin
    d_t = '0; d_f = '0;
    #1;
    check(!done_reset, "start low");
    for (int r = 0; r < 20; r++) begin
      int order [W];
      logic [W-1:0] v;
      v = $urandom;
      foreach (order[i]) order[i] = i;
      order.shuffle();
      for (int i = 0; i < W; i++) begin
        d_t[order[i]] = v[order[i]];
        d_f[order[i]] = !v[order[i]];
        #1;
        check(done_reset == (i == W-1), $sformatf("rise after %0d bits", i + 1));
      end
      order.shuffle();
      for (int i = 0; i < W; i++) begin
        d_t[order[i]] = 1'b0;
        d_f[order[i]] = 1'b0;
        #1;
        check(done_reset == (i != W-1), $sformatf("fall after %0d bits", i + 1));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
