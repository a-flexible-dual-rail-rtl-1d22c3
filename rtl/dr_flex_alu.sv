// dr_flex_alu: flexible two-stage dual-rail 32-bit ALU (top level).
//
// The ALU generalises the multiply-accumulate instruction: a first ALU
// combines Source1 and Source2 under FnCode1, and a second ALU can combine
// that intermediate result with Source3 under FnCode2, so one pass executes
// either a single ("common") operation or a pair of dependent operations
// ("compound" instruction, e.g. multiply then add, shift then add).
// FnCode2 = 0000 means bypass: a Demux-Demux pair routes the first ALU's
// result either into the second ALU (bypass_or_not = 1) or around it
// (bypass_or_not = 0); a final Merge (OR) joins the second ALU's output and
// the bypass path. Every signal is dual-rail and every stage works only when
// data reaches it, so a common instruction never waits for the second ALU
// and a cheap operation never waits for the multiplier.
//
// Protocol (4-phase dual-rail, delay-insensitive at the ports): the
// environment makes all inputs valid (src1..3, fn1, fn2, mode1, mode2) and
// waits for `done` to rise; `result` is then valid. It then returns all
// inputs to empty (all rails 0) and waits for `done` to fall before the next
// operation. Inputs must be empty at start-up. FnCode1 must be 0001-1000 and
// FnCode2 0000-1000; other codes select nothing and the handshake would not
// complete. Operand order in the second ALU: the first ALU's result is
// operand a (the value shifted, the minuend), Source3 is operand b.
//
// Interface: see the port list. mode1/mode2 choose subtract, arithmetic shift
// and rotate for the first/second ALU (dr_alu_stage).
// Beside the ALU, and not connected to it, the top also holds the plain
// 4-phase dual-rail Muller pipeline (dr_pipeline, PIPE_STAGES x PIPE_W) that
// illustrates the handshake style; its ports are the pipe_* signals.
// Timing: data-dependent; there is no clock.
module dr_flex_alu
  import dr_pkg::*;
#(
  parameter int unsigned PIPE_STAGES = 3,
  parameter int unsigned PIPE_W      = 3
) (
  input  dr_word_t src1,
  input  dr_word_t src2,
  input  dr_word_t src3,
  input  dr_code_t fn1,
  input  dr_code_t fn2,
  input  dr_mode_t mode1,
  input  dr_mode_t mode2,
  output dr_word_t result,
  output logic     done,
  // stand-alone dual-rail pipeline
  input  logic              pipe_rst,
  input  logic [PIPE_W-1:0] pipe_in_t, pipe_in_f,
  output logic              pipe_in_ack,
  output logic [PIPE_W-1:0] pipe_out_t, pipe_out_f,
  input  logic              pipe_out_ack
);

  dr_word_t r1, to_alu2, bypass, r2;

  // ---- first ALU ------------------------------------------------------------
  dr_alu_stage u_alu1 (.a(src1), .b(src2), .code(fn1), .mode(mode1), .y(r1));

  // ---- bypass_or_not from FnCode2 and the Demux-Demux pair -----------------
  logic [2**FNW-1:0] sel2;   // minterms of FnCode2; only bypass_or_not is used here
  logic              bno_t, bno_f;
  dr_fn_decode u_bno (.code_t(fn2.t), .code_f(fn2.f), .sel(sel2), .bno_t, .bno_f);

  dr_demux #(.W(WORD)) u_to_alu2 (.in_t(r1.t), .in_f(r1.f), .sel(bno_t), .y_t(to_alu2.t), .y_f(to_alu2.f));
  dr_demux #(.W(WORD)) u_bypass  (.in_t(r1.t), .in_f(r1.f), .sel(bno_f), .y_t(bypass.t),  .y_f(bypass.f));

  // ---- second ALU and final merge -------------------------------------------
  dr_alu_stage u_alu2 (.a(to_alu2), .b(src3), .code(fn2), .mode(mode2), .y(r2));

  dr_merge #(.W(WORD), .N(2)) u_merge (
    .in_t({r2.t, bypass.t}), .in_f({r2.f, bypass.f}),
    .y_t(result.t), .y_f(result.f));

  // ---- completion detection on the result ----------------------------------
  dr_completion #(.W(WORD)) u_done (.d_t(result.t), .d_f(result.f), .done_reset(done));

  // ---- stand-alone Muller pipeline ------------------------------------------
  dr_pipeline #(.STAGES(PIPE_STAGES), .W(PIPE_W)) u_pipe (
    .rst(pipe_rst), .in_t(pipe_in_t), .in_f(pipe_in_f), .in_ack(pipe_in_ack),
    .out_t(pipe_out_t), .out_f(pipe_out_f), .out_ack(pipe_out_ack));

  // The second ALU and the bypass path never both carry data, and no result
  // bit is ever (1,1).
  always_comb begin
    assert (word_empty(r2) || word_empty(bypass))
      else $error("second ALU and bypass both active");
    assert ((result.t & result.f) == '0)
      else $error("illegal dual-rail code (1,1) on result");
  end

endmodule
