// tb_dr_merge: with one of N branches carrying a dual-rail word and the
// others empty, the merge outputs that word; with all empty it is empty.
module tb_dr_merge;
  int checks = 0, failures = 0;
  `include "tb_watchdog.svh"

  localparam int W = 32, N = 8;
  logic [N-1:0][W-1:0] in_t, in_f;
  logic [W-1:0] y_t, y_f;

  dr_merge #(.W(W), .N(N)) dut (.*);

  initial begin
    in_t = '0; in_f = '0;
    #1;
    for (int i = 0; i < 300; i++) begin
      logic [W-1:0] v;
      int k;
      v = $urandom; k = $urandom_range(0, N-1);
      in_t[k] = v; in_f[k] = ~v;
      #1;
      check(y_t == v && y_f == ~v, $sformatf("branch %0d", k));
      in_t = '0; in_f = '0;
      #1;
      check((y_t | y_f) == '0, "not empty");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
