// tb_flex_alu_pairs: the compound-instruction pairs the design was sized for,
// each run through the full-size two-stage ALU in both orders, with small
// operands (144, 213, ...) and with random ones: add/sub+add/sub,
// add/sub+mul, add/sub+shift_left, add/sub+shift_right, add/sub+and,
// add/sub+or, and+and, and+or, and+shift_right, or+shift_left,
// or+shift_right, or+or, shift_left+shift_left, shift_left+shift_right,
// shift_right+shift_right; plus the multiply-accumulate 213 + 216*144 = 31317
// and every operation as a common (bypassed) instruction.
module tb_flex_alu_pairs;
  import dr_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  `include "tb_watchdog.svh"

  dr_word_t src1, src2, src3, result;
  dr_code_t fn1, fn2;
  dr_mode_t mode1, mode2;
  logic     done, pipe_in_ack;
  logic [2:0] pipe_out_t, pipe_out_f;

  dr_flex_alu dut (.src1, .src2, .src3, .fn1, .fn2, .mode1, .mode2, .result, .done,
                   .pipe_rst(1'b1), .pipe_in_t(3'b0), .pipe_in_f(3'b0), .pipe_in_ack,
                   .pipe_out_t, .pipe_out_f, .pipe_out_ack(1'b0));

  task automatic run_op(input logic [3:0] f1, input logic [1:0] m1, input logic [3:0] f2,
                        input logic [1:0] m2, input logic [31:0] s1, input logic [31:0] s2,
                        input logic [31:0] s3, output logic [31:0] got);
    logic [31:0] e;
    e = flex_ref(f1, m1, f2, m2, s1, s2, s3);
    src1 = enc_word(s1); src2 = enc_word(s2); src3 = enc_word(s3);
    mode1 = enc_mode(m1); mode2 = enc_mode(m2); fn1 = enc_code(f1); fn2 = enc_code(f2);
    #1;
    got = result.t;
    check(done && word_valid(result) && result.t == e,
          $sformatf("fn1=%0d fn2=%0d %0d,%0d,%0d got %0d exp %0d", f1, f2, s1, s2, s3, result.t, e));
    src1 = '0; src2 = '0; src3 = '0; mode1 = '0; mode2 = '0; fn1 = '0; fn2 = '0;
    #1;
    check(!done && word_empty(result), "not empty");
  endtask

  // first operation of each pair; the second is in PAIR_B at the same index
  localparam fncode_e PAIR_A [15] = '{FN_ADDSUB, FN_ADDSUB, FN_ADDSUB, FN_ADDSUB, FN_ADDSUB, FN_ADDSUB,
                                      FN_AND, FN_AND, FN_AND, FN_OR, FN_OR, FN_OR, FN_SHL, FN_SHL, FN_SHR};
  localparam fncode_e PAIR_B [15] = '{FN_ADDSUB, FN_MUL, FN_SHL, FN_SHR, FN_AND, FN_OR,
                                      FN_AND, FN_OR, FN_SHR, FN_SHL, FN_SHR, FN_OR, FN_SHL, FN_SHR, FN_SHR};

  initial begin
    logic [31:0] got;
    src1 = '0; src2 = '0; src3 = '0; mode1 = '0; mode2 = '0; fn1 = '0; fn2 = '0;
    #1;
    run_op(FN_MUL, 2'b00, FN_ADDSUB, 2'b00, 32'd216, 32'd144, 32'd213, got);
    check(got == 32'd31317, "multiply-accumulate 213 + 216*144");
    for (int c = 1; c <= 8; c++) run_op(4'(c), 2'b00, FN_BYPASS, 2'b00, 32'd213, 32'd144, 32'd0, got);
    for (int p = 0; p < 15; p++)
      for (int order = 0; order < 2; order++) begin
        fncode_e fa, fb;
        fa = order ? PAIR_B[p] : PAIR_A[p];
        fb = order ? PAIR_A[p] : PAIR_B[p];
        run_op(fa, 2'b00, fb, 2'b00, 32'd213, 32'd144, 32'd3, got);
        run_op(fa, 2'b01, fb, 2'b01, 32'd144, 32'd213, 32'd5, got);
        for (int r = 0; r < 50; r++)
          run_op(fa, pick_mode(), fb, pick_mode(), $urandom, $urandom, $urandom, got);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
