// dr_cla_adder: W-bit delay-insensitive carry-lookahead adder (DICLA).
//
// W C modules form each bit's (kill, generate, propagate) code. A binary tree
// of D modules merges codes of neighbouring groups level by level (pairs of
// bits, then groups of 4, 8, ...) and, on the way back, hands each group's
// carry-in down to its upper half, so that every carry C_1..C_{W-1} is made by
// exactly one D module; a last D module forms the carry-out C_W from the code
// of the whole word and C_0. This is the tree drawn for 8 bits in the design,
// generalised to any power-of-two width (32 in the ALU).
//
// A completion detector on the sum and carry-out bits raises `done` when
// all of them are valid and lowers it when all are empty.
//
// Interface: a, b (W-bit dual-rail), ci (dual-rail carry-in) in; s (W-bit
// dual-rail), co (dual-rail carry-out) and done out.
// Timing: each sum bit turns valid as soon as its carry is known; a long
// carry chain takes about 2*log2(W) D-module delays, but kills and generates
// cut it short. All outputs return to empty after all inputs do.
module dr_cla_adder #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a_t, a_f,
  input  logic [W-1:0] b_t, b_f,
  input  logic         ci_t, ci_f,
  output logic [W-1:0] s_t, s_f,
  output logic         co_t, co_f,
  output logic         done
);

  localparam int unsigned L = $clog2(W);

  // Codes of all groups, level by level: level l has W>>l groups starting at
  // offset 2W - 2(W>>l). Level 0 holds the single bits.
  logic [2*W-2:0] gk, gg, gp;
  logic [W:0]     c_t, c_f;

  assign c_t[0] = ci_t;
  assign c_f[0] = ci_f;

  dr_cla_cmod #(.W(W)) u_cmod (
    .a_t, .a_f, .b_t, .b_f,
    .c_t(c_t[W-1:0]), .c_f(c_f[W-1:0]),
    .s_t, .s_f,
    .k(gk[W-1:0]), .g(gg[W-1:0]), .p(gp[W-1:0])
  );

  for (genvar l = 1; l <= L; l++) begin : g_lvl
    localparam int unsigned OFS_IN  = 2*W - 2*(W >> (l-1));
    localparam int unsigned OFS_OUT = 2*W - 2*(W >> l);
    for (genvar b = 0; b < (W >> l); b++) begin : g_blk
      localparam int unsigned LO = b << l;               // carry-in position
      localparam int unsigned MID = LO + (1 << (l-1));   // carry into upper half
      dr_cla_dmod u_d (
        .hk(gk[OFS_IN + 2*b + 1]), .hg(gg[OFS_IN + 2*b + 1]), .hp(gp[OFS_IN + 2*b + 1]),
        .lk(gk[OFS_IN + 2*b]),     .lg(gg[OFS_IN + 2*b]),     .lp(gp[OFS_IN + 2*b]),
        .ck_t(c_t[LO]), .ck_f(c_f[LO]),
        .ok(gk[OFS_OUT + b]), .og(gg[OFS_OUT + b]), .op(gp[OFS_OUT + b]),
        .cj_t(c_t[MID]), .cj_f(c_f[MID])
      );
    end
  end

  // Carry-out: a D module whose lower group is the whole word. Its merged
  // code output is not needed.
  logic unused_k, unused_g, unused_p;
  dr_cla_dmod u_dout (
    .hk(gk[2*W-2]), .hg(gg[2*W-2]), .hp(gp[2*W-2]),
    .lk(gk[2*W-2]), .lg(gg[2*W-2]), .lp(gp[2*W-2]),
    .ck_t(c_t[0]), .ck_f(c_f[0]),
    .ok(unused_k), .og(unused_g), .op(unused_p),
    .cj_t(c_t[W]), .cj_f(c_f[W])
  );

  assign co_t = c_t[W];
  assign co_f = c_f[W];

  dr_completion #(.W(W+1)) u_done (.d_t({c_t[W], s_t}), .d_f({c_f[W], s_f}), .done_reset(done));

endmodule
