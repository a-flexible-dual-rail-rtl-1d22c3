// tb_dr_fn_decode: every 4-bit FnCode value gives exactly one select line and
// the right dual-rail bypass_or_not; a partly valid code gives none; an empty
// code clears everything.
module tb_dr_fn_decode;
  int checks = 0, failures = 0;
  `include "tb_watchdog.svh"

  logic [3:0]  code_t, code_f;
  logic [15:0] sel;
  logic        bno_t, bno_f;

  dr_fn_decode dut (.*);

  initial begin
    code_t = '0; code_f = '0;
    #1;
    for (int r = 0; r < 3; r++)
      for (int v = 0; v < 16; v++) begin
        code_t[2:0] = 3'(v); code_f[2:0] = ~3'(v);
        #1;
        check(sel == '0 && !bno_t && !bno_f, "output from a partly valid code");
        code_t[3] = v[3]; code_f[3] = !v[3];
        #1;
        check(sel == 16'(1 << v), $sformatf("code %0d sel %b", v, sel));
        check(bno_t == (v != 0) && bno_f == (v == 0), $sformatf("code %0d bypass_or_not", v));
        code_t = '0; code_f = '0;
        #1;
        check(sel == '0 && !bno_t && !bno_f, "not empty");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
