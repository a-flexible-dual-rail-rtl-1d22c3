// tb_dr_alu_stage: one ALU stage at full width. Every FnCode with random
// operands and modes against the integer model; checks that only the
// selected function block sees data (the demultiplexer) and that codes
// outside 0001-1000 leave the output empty.
module tb_dr_alu_stage;
  import dr_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  `include "tb_watchdog.svh"

  dr_word_t a, b, y;
  dr_code_t code;
  dr_mode_t mode;

  dr_alu_stage dut (.a, .b, .code, .mode, .y);

  task automatic one(input logic [3:0] c, input logic [1:0] m, input logic [31:0] va, input logic [31:0] vb);
    logic [31:0] e;
    e = alu_ref(c, m, va, vb);
    a = enc_word(va); b = enc_word(vb); mode = enc_mode(m);
    #1;
    check(word_empty(y), "output before FnCode");
    code = enc_code(c);
    #1;
    if (c inside {[4'd1:4'd8]}) begin
      check(word_valid(y) && y.t == e, $sformatf("code %0d mode %0d %h,%h got %h exp %h", c, m, va, vb, y.t, e));
      for (int k = 0; k < NFUNC; k++)
        if (k != c - 1) check(dut.fo_t[k] == '0 && dut.fo_f[k] == '0, $sformatf("block %0d busy for code %0d", k + 1, c));
    end else begin
      check(word_empty(y), $sformatf("code %0d must select nothing", c));
    end
    a = '0; b = '0; mode = '0; code = '0;
    #1;
    check(word_empty(y), "not empty");
  endtask

  initial begin
    a = '0; b = '0; mode = '0; code = '0;
    #1;
    for (int c = 0; c < 16; c++) one(4'(c), 2'b00, 32'd216, 32'd144);
    for (int i = 0; i < 1500; i++)
      one(4'($urandom_range(1, 8)), pick_mode(), $urandom,
          ($urandom_range(0, 1) == 0) ? 32'($urandom_range(0, 31)) : $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
