// dr_alu_stage: one of the two ALUs of the flexible dual-rail ALU.
//
// The dual-rail FnCode is decoded into one-hot select lines, and a
// demultiplexer (C-elements) forwards the operands only to the function
// block the code selects; all other blocks stay empty and do no work, so the
// stage takes as long as the selected block, not the slowest one. The blocks'
// outputs are merged with OR gates. Function blocks and codes:
//   0001 Add/Sub   32-bit DI carry-lookahead adder, a + b or a - b
//   0010 Multiply  16 x 16 array multiplier on a[15:0], b[15:0], 32-bit product
//   0011 AND, 0100 OR, 0110 XOR   DIMS gates, bit-wise
//   0101 NOT       ~a (the two rails swapped)
//   0111 Shift Left, 1000 Shift Right   logarithmic shifters, amount b[4:0]
// Which of add/subtract, logical/arithmetic and shift/rotate is done is not
// part of FnCode; in this design a 2-bit dual-rail `mode` supplies it:
// mode[0] = 1 subtracts (Add/Sub) or selects the arithmetic shift,
// mode[1] = 1 selects rotate. Subtraction is a + ~b + 1: b is XORed with
// mode[0] and mode[0] itself is the adder's carry-in. Codes 0000 and
// 1001-1111 select no block: the output then stays empty.
//
// Interface: a, b (dual-rail words), code (dual-rail FnCode), mode
// (dual-rail) in; y (dual-rail word) out.
// Timing: y becomes valid after the selected block finishes and empty after
// the inputs are empty again.
module dr_alu_stage
  import dr_pkg::*;
(
  input  dr_word_t a,
  input  dr_word_t b,
  input  dr_code_t code,
  input  dr_mode_t mode,
  output dr_word_t y
);

  localparam int unsigned SHW = $clog2(WORD);

  logic [2**FNW-1:0] sel;
  logic              bno_t, bno_f;   // not used inside a stage

  dr_fn_decode u_dec (.code_t(code.t), .code_f(code.f), .sel, .bno_t, .bno_f);

  // outputs of the eight function blocks, index = FnCode - 1
  logic [NFUNC-1:0][WORD-1:0] fo_t, fo_f;

  // ---- 0001 Add/Sub -------------------------------------------------------
  begin : g_add
    dr_word_t   ga, gb, bx;
    logic       m_t, m_f;        // subtract
    logic       co_t, co_f;      // carry-out, not part of the 32-bit result
    logic       add_done;        // block completion; the ALU detects it at its result
    dr_demux #(.W(WORD)) u_da (.in_t(a.t), .in_f(a.f), .sel(sel[FN_ADDSUB]), .y_t(ga.t), .y_f(ga.f));
    dr_demux #(.W(WORD)) u_db (.in_t(b.t), .in_f(b.f), .sel(sel[FN_ADDSUB]), .y_t(gb.t), .y_f(gb.f));
    dr_demux #(.W(1))    u_dm (.in_t(mode.t[0]), .in_f(mode.f[0]), .sel(sel[FN_ADDSUB]), .y_t(m_t), .y_f(m_f));
    dims_gate #(.W(WORD), .OP(DIMS_XOR)) u_inv (
      .a_t(gb.t), .a_f(gb.f), .b_t({WORD{m_t}}), .b_f({WORD{m_f}}),
      .y_t(bx.t), .y_f(bx.f));
    dr_cla_adder #(.W(WORD)) u_add (
      .a_t(ga.t), .a_f(ga.f), .b_t(bx.t), .b_f(bx.f), .ci_t(m_t), .ci_f(m_f),
      .s_t(fo_t[FN_ADDSUB-1]), .s_f(fo_f[FN_ADDSUB-1]), .co_t, .co_f, .done(add_done));
  end

  // ---- 0010 Multiply ------------------------------------------------------
  begin : g_mul
    logic [MULW-1:0] x_t, x_f, z_t, z_f;
    dr_demux #(.W(MULW)) u_da (.in_t(a.t[MULW-1:0]), .in_f(a.f[MULW-1:0]), .sel(sel[FN_MUL]), .y_t(x_t), .y_f(x_f));
    dr_demux #(.W(MULW)) u_db (.in_t(b.t[MULW-1:0]), .in_f(b.f[MULW-1:0]), .sel(sel[FN_MUL]), .y_t(z_t), .y_f(z_f));
    logic mul_done;              // block completion; the ALU detects it at its result
    dr_array_mult #(.N(MULW)) u_mul (.x_t, .x_f, .y_t(z_t), .y_f(z_f),
                                     .p_t(fo_t[FN_MUL-1]), .p_f(fo_f[FN_MUL-1]), .done(mul_done));
  end

  // ---- 0011 AND, 0100 OR, 0110 XOR ----------------------------------------
  localparam fncode_e LOGIC_FN [3] = '{FN_AND, FN_OR, FN_XOR};
  localparam dims_op_e LOGIC_OP [3] = '{DIMS_AND, DIMS_OR, DIMS_XOR};
  for (genvar n = 0; n < 3; n++) begin : g_logic
    dr_word_t ga, gb;
    dr_demux #(.W(WORD)) u_da (.in_t(a.t), .in_f(a.f), .sel(sel[LOGIC_FN[n]]), .y_t(ga.t), .y_f(ga.f));
    dr_demux #(.W(WORD)) u_db (.in_t(b.t), .in_f(b.f), .sel(sel[LOGIC_FN[n]]), .y_t(gb.t), .y_f(gb.f));
    dims_gate #(.W(WORD), .OP(LOGIC_OP[n])) u_g (
      .a_t(ga.t), .a_f(ga.f), .b_t(gb.t), .b_f(gb.f),
      .y_t(fo_t[LOGIC_FN[n]-1]), .y_f(fo_f[LOGIC_FN[n]-1]));
  end

  // ---- 0101 NOT -----------------------------------------------------------
  begin : g_not
    dr_word_t ga;
    dr_demux #(.W(WORD)) u_da (.in_t(a.t), .in_f(a.f), .sel(sel[FN_NOT]), .y_t(ga.t), .y_f(ga.f));
    assign fo_t[FN_NOT-1] = ga.f;
    assign fo_f[FN_NOT-1] = ga.t;
  end

  // ---- 0111 Shift Left, 1000 Shift Right ----------------------------------
  localparam fncode_e SHIFT_FN [2] = '{FN_SHL, FN_SHR};
  for (genvar n = 0; n < 2; n++) begin : g_shift
    dr_word_t       ga;
    logic [SHW-1:0] gb_t, gb_f;
    logic [1:0]     m_t, m_f;
    dr_demux #(.W(WORD)) u_da (.in_t(a.t), .in_f(a.f), .sel(sel[SHIFT_FN[n]]), .y_t(ga.t), .y_f(ga.f));
    dr_demux #(.W(SHW))  u_db (.in_t(b.t[SHW-1:0]), .in_f(b.f[SHW-1:0]), .sel(sel[SHIFT_FN[n]]), .y_t(gb_t), .y_f(gb_f));
    dr_demux #(.W(2))    u_dm (.in_t(mode.t), .in_f(mode.f), .sel(sel[SHIFT_FN[n]]), .y_t(m_t), .y_f(m_f));
    dr_shifter #(.W(WORD), .LEFT(n == 0)) u_sh (
      .a_t(ga.t), .a_f(ga.f), .b_t(gb_t), .b_f(gb_f),
      .ari_t(m_t[0]), .ari_f(m_f[0]), .rot_t(m_t[1]), .rot_f(m_f[1]),
      .r_t(fo_t[SHIFT_FN[n]-1]), .r_f(fo_f[SHIFT_FN[n]-1]));
  end

  dr_merge #(.W(WORD), .N(NFUNC)) u_merge (.in_t(fo_t), .in_f(fo_f), .y_t(y.t), .y_f(y.f));

endmodule
