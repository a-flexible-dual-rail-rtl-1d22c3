// tb_dr_flex_alu: end-to-end test of the two-stage dual-rail ALU at its
// default (full) size.
//
// Runs the 4-phase handshake for directed operations (the multiply-accumulate
// example 213 + 216*144 and one pair of every combination class measured for
// the design) and for random common and compound instructions, comparing
// each result with an integer model. It also checks that the result stays
// empty while any input is still empty, that the second ALU idles on a
// bypass, that the multiplier idles unless selected, and that `done` follows
// the result's validity. Every FnCode in both ALUs, bypass, compound
// operation, subtract, arithmetic shifts and rotates must occur. The
// stand-alone dual-rail pipeline beside the ALU carries a stream of words
// with receiver stalls at the same time.
module tb_dr_flex_alu;

  import dr_pkg::*;
  import tb_ref_pkg::*;

  localparam int NRAND = 3000;

  dr_word_t src1, src2, src3, result;
  dr_code_t fn1, fn2;
  dr_mode_t mode1, mode2;
  logic     done;

  logic       pipe_rst, pipe_in_ack, pipe_out_ack;
  logic [2:0] pipe_in_t, pipe_in_f, pipe_out_t, pipe_out_f;

  dr_flex_alu dut (.src1, .src2, .src3, .fn1, .fn2, .mode1, .mode2, .result, .done,
                   .pipe_rst, .pipe_in_t, .pipe_in_f, .pipe_in_ack,
                   .pipe_out_t, .pipe_out_f, .pipe_out_ack);

  // Stand-alone pipeline: push NPIPE words through, the receiver stalling at
  // times; words must come out in order.
  localparam int NPIPE = 50;
  logic [2:0] pipe_sent [$];
  int n_pipe_recv = 0, n_pipe_stall = 0;
  initial begin : pipe_sender
    pipe_rst = 1'b1; pipe_in_t = '0; pipe_in_f = '0;
    #3 pipe_rst = 1'b0;
    for (int i = 0; i < NPIPE; i++) begin
      logic [2:0] v;
      v = 3'($urandom);
      wait (!pipe_in_ack);
      #1 pipe_in_t = v; pipe_in_f = ~v;
      pipe_sent.push_back(v);
      wait (pipe_in_ack);
      #1 pipe_in_t = '0; pipe_in_f = '0;
    end
  end
  initial begin : pipe_receiver
    pipe_out_ack = 1'b0;
    #3;
    while (n_pipe_recv < NPIPE) begin
      logic [2:0] e;
      wait ((pipe_out_t ^ pipe_out_f) == '1);
      if (n_pipe_recv % 3 == 0) begin n_pipe_stall++; #7; end
      e = pipe_sent.pop_front();
      check(pipe_out_t == e, $sformatf("pipeline word %0d: got %0d exp %0d", n_pipe_recv, pipe_out_t, e));
      n_pipe_recv++;
      #1 pipe_out_ack = 1'b1;
      wait ((pipe_out_t | pipe_out_f) == '0);
      #1 pipe_out_ack = 1'b0;
    end
  end

  int checks = 0, failures = 0;
  int n_fn1 [9], n_fn2 [9];
  int n_bypass = 0, n_compound = 0, n_sub = 0, n_ari = 0, n_rot = 0;
  int n_idle_alu2 = 0, n_idle_mul = 0, n_partial = 0;

  // watchdog: the design has no clock, this one only bounds the run time
  logic clk = 1'b0;
  int   cycles = 0;
  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (cycles > 2_000_000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic all_empty();
    src1 = '0; src2 = '0; src3 = '0; fn1 = '0; fn2 = '0; mode1 = '0; mode2 = '0;
  endtask

  // One full 4-phase operation.
  task automatic run_op(input logic [3:0] f1, input logic [1:0] m1,
                        input logic [3:0] f2, input logic [1:0] m2,
                        input logic [31:0] s1, input logic [31:0] s2, input logic [31:0] s3);
    logic [31:0] exp_r;
    exp_r = flex_ref(f1, m1, f2, m2, s1, s2, s3);
    // data arrives first, the codes last: nothing may come out before
    src1 = enc_word(s1); src2 = enc_word(s2); src3 = enc_word(s3);
    mode1 = enc_mode(m1); mode2 = enc_mode(m2);
    fn1 = enc_code(f1);
    #1;
    check(word_empty(result) && !done, "result must wait for FnCode2");
    if (word_empty(result)) n_partial++;
    fn2 = enc_code(f2);
    #1;
    check(done, $sformatf("done did not rise fn1=%0d fn2=%0d", f1, f2));
    check(word_valid(result), "result not fully valid");
    check(result.t == exp_r,
          $sformatf("fn1=%0d m1=%0d fn2=%0d m2=%0d s=%h,%h,%h: got %h exp %h",
                    f1, m1, f2, m2, s1, s2, s3, result.t, exp_r));
    if (f2 == FN_BYPASS) begin
      check(word_empty(dut.r2), "second ALU must stay empty on bypass");
      n_idle_alu2++;
    end
    if (f1 != FN_MUL) begin
      check(dut.u_alu1.g_mul.x_t == '0 && dut.u_alu1.g_mul.x_f == '0,
            "multiplier of ALU1 must stay empty");
      n_idle_mul++;
    end
    n_fn1[f1]++; n_fn2[f2]++;
    if (f2 == FN_BYPASS) n_bypass++; else n_compound++;
    if ((f1 == FN_ADDSUB && m1[0]) || (f2 == FN_ADDSUB && m2[0])) n_sub++;
    if ((f1 inside {FN_SHL, FN_SHR} && m1 == 2'b01) || (f2 inside {FN_SHL, FN_SHR} && m2 == 2'b01)) n_ari++;
    if ((f1 inside {FN_SHL, FN_SHR} && m1[1]) || (f2 inside {FN_SHL, FN_SHR} && m2[1])) n_rot++;
    // return to empty, one input at a time: done holds until all are empty
    src1 = '0;
    #1;
    check(done, "done fell before all inputs were empty");
    all_empty();
    #1;
    check(!done && word_empty(result), "result did not return to empty");
  endtask

  initial begin
    all_empty();
    #2;
    check(!done && word_empty(result), "not empty after start-up");

    // multiply-accumulate example: 213 + 216*144
    run_op(FN_MUL, 2'b00, FN_ADDSUB, 2'b00, 32'd216, 32'd144, 32'd213);
    // one pair of each combination class
    run_op(FN_ADDSUB, 2'b00, FN_ADDSUB, 2'b00, 32'd7, 32'd4064, 32'd15);
    run_op(FN_ADDSUB, 2'b00, FN_SHL,    2'b00, 32'd144, 32'd213, 32'd3);
    run_op(FN_ADDSUB, 2'b01, FN_SHR,    2'b00, 32'd213, 32'd144, 32'd2);
    run_op(FN_SHL,    2'b00, FN_ADDSUB, 2'b00, 32'd5,   32'd3,   32'd100);
    run_op(FN_SHL,    2'b00, FN_SHL,    2'b00, 32'd213, 32'd4,   32'd5);
    run_op(FN_SHL,    2'b00, FN_SHR,    2'b00, 32'd213, 32'd20,  32'd7);
    run_op(FN_SHR,    2'b00, FN_SHR,    2'b01, 32'h8000_0000, 32'd3, 32'd2);
    run_op(FN_AND,    2'b00, FN_AND,    2'b00, 32'hF0F0_FFFF, 32'h0FF0_00FF, 32'h00F0_000F);
    run_op(FN_AND,    2'b00, FN_OR,     2'b00, 32'h1234_5678, 32'h0000_FFFF, 32'hABCD_0000);
    run_op(FN_AND,    2'b00, FN_SHR,    2'b00, 32'hDEAD_BEEF, 32'h0000_FF00, 32'd8);
    run_op(FN_OR,     2'b00, FN_SHL,    2'b00, 32'h0000_0101, 32'h0000_1000, 32'd4);
    run_op(FN_OR,     2'b00, FN_OR,     2'b00, 32'd1, 32'd2, 32'd4);
    run_op(FN_NOT,    2'b00, FN_XOR,    2'b00, 32'h0F0F_0F0F, 32'd0, 32'hFFFF_0000);
    run_op(FN_ADDSUB, 2'b00, FN_MUL,    2'b00, 32'd100, 32'd44, 32'd213);
    run_op(FN_SHR,    2'b10, FN_BYPASS, 2'b00, 32'h1234_5678, 32'd12, 32'd0);
    run_op(FN_SHL,    2'b10, FN_BYPASS, 2'b00, 32'h1234_5678, 32'd12, 32'd0);
    run_op(FN_SHL,    2'b01, FN_BYPASS, 2'b00, 32'h8000_0001, 32'd5, 32'd0);
    run_op(FN_ADDSUB, 2'b01, FN_BYPASS, 2'b00, 32'd3, 32'd5, 32'd0);

    for (int i = 0; i < NRAND; i++) begin
      logic [3:0] f1, f2;
      f1 = 4'($urandom_range(1, 8));
      f2 = ($urandom_range(0, 3) == 0) ? 4'd0 : 4'($urandom_range(1, 8));
      run_op(f1, pick_mode(), f2, pick_mode(), $urandom, $urandom,
             ($urandom_range(0, 1) == 0) ? 32'($urandom_range(0, 31)) : $urandom);
    end

    for (int c = 1; c <= 8; c++) begin
      check(n_fn1[c] > 0, $sformatf("FnCode1 %0d never used", c));
      check(n_fn2[c] > 0, $sformatf("FnCode2 %0d never used", c));
    end
    check(n_bypass > 0, "bypass never happened");
    check(n_compound > 0, "compound instruction never happened");
    check(n_sub > 0, "subtract never happened");
    check(n_ari > 0, "arithmetic shift never happened");
    check(n_rot > 0, "rotate never happened");
    wait (n_pipe_recv == NPIPE);
    check(n_pipe_stall > 0, "pipeline receiver never stalled");
    check(n_idle_alu2 > 0 && n_idle_mul > 0 && n_partial > 0, "idle checks never ran");
    $display("bypass=%0d compound=%0d sub=%0d ari=%0d rot=%0d pipeline words=%0d stalls=%0d",
             n_bypass, n_compound, n_sub, n_ari, n_rot, n_pipe_recv, n_pipe_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
