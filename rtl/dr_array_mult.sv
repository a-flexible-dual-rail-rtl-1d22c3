// dr_array_mult: N x N unsigned dual-rail array multiplier (N = 16 in the ALU).
//
// Partial products: row j is the multiplicand x ANDed with multiplier bit
// y[j], using N DIMS AND gates per row. Addition array: right-to-left rows of
// DIMS adders. Row j (j = 1..N-1) adds partial-product row j to the previous
// row's sum shifted right by one bit (its carry-out entering at the top); the
// carry ripples from bit to bit inside the row and each row's bit 0 drops out
// as product bit j. The last row's sums and carry-out give the upper half of
// the product. Positions with only two operands (bit 0 of every row, and the
// top bit of row 1) use half adders. There is no separate final-stage adder:
// the last ripple row plays that part. A completion detector watches all
// product bits (the low bit of every row and the last row's outputs) and
// raises `done` when the whole product is valid, lowering it when the
// product is empty again.
//
// Interface: x, y (N-bit dual-rail) in; p (2N-bit dual-rail) and done out.
// Timing: each product bit becomes valid as soon as the cells feeding it
// have; the worst case runs along the bottom row and up the rows.
module dr_array_mult #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   x_t, x_f,
  input  logic [N-1:0]   y_t, y_f,
  output logic [2*N-1:0] p_t, p_f,
  output logic           done
);

  import dr_pkg::*;

  // pp[j]: partial-product row j; s[j]: sum bits of row j; co[j]: its carry-out
  logic [N-1:0][N-1:0] pp_t, pp_f, s_t, s_f;
  logic [N-1:1]        co_t, co_f;

  for (genvar j = 0; j < N; j++) begin : g_pp
    dims_gate #(.W(N), .OP(DIMS_AND)) u_and (
      .a_t(x_t), .a_f(x_f),
      .b_t({N{y_t[j]}}), .b_f({N{y_f[j]}}),
      .y_t(pp_t[j]), .y_f(pp_f[j])
    );
  end

  assign s_t[0] = pp_t[0];
  assign s_f[0] = pp_f[0];

  for (genvar j = 1; j < N; j++) begin : g_row
    logic [N:1] c_t, c_f;   // c[i]: carry into bit i of this row

    // operand B of bit i is the previous row's bit i+1 (or its carry-out)
    dims_half_adder #(.W(1)) u_b0 (
      .a_t(pp_t[j][0]), .a_f(pp_f[j][0]),
      .b_t(s_t[j-1][1]), .b_f(s_f[j-1][1]),
      .s_t(s_t[j][0]), .s_f(s_f[j][0]),
      .co_t(c_t[1]), .co_f(c_f[1])
    );

    for (genvar i = 1; i < N-1; i++) begin : g_mid
      dims_full_adder #(.W(1)) u_fa (
        .a_t(pp_t[j][i]), .a_f(pp_f[j][i]),
        .b_t(s_t[j-1][i+1]), .b_f(s_f[j-1][i+1]),
        .ci_t(c_t[i]), .ci_f(c_f[i]),
        .s_t(s_t[j][i]), .s_f(s_f[j][i]),
        .co_t(c_t[i+1]), .co_f(c_f[i+1])
      );
    end

    if (j == 1) begin : g_top_ha
      dims_half_adder #(.W(1)) u_ha (
        .a_t(pp_t[j][N-1]), .a_f(pp_f[j][N-1]),
        .b_t(c_t[N-1]), .b_f(c_f[N-1]),
        .s_t(s_t[j][N-1]), .s_f(s_f[j][N-1]),
        .co_t(c_t[N]), .co_f(c_f[N])
      );
    end else begin : g_top_fa
      dims_full_adder #(.W(1)) u_fa (
        .a_t(pp_t[j][N-1]), .a_f(pp_f[j][N-1]),
        .b_t(co_t[j-1]), .b_f(co_f[j-1]),
        .ci_t(c_t[N-1]), .ci_f(c_f[N-1]),
        .s_t(s_t[j][N-1]), .s_f(s_f[j][N-1]),
        .co_t(c_t[N]), .co_f(c_f[N])
      );
    end

    assign co_t[j] = c_t[N];
    assign co_f[j] = c_f[N];
    assign p_t[j-1] = s_t[j-1][0];
    assign p_f[j-1] = s_f[j-1][0];
  end

  assign p_t[2*N-1:N-1] = {co_t[N-1], s_t[N-1]};
  assign p_f[2*N-1:N-1] = {co_f[N-1], s_f[N-1]};

  dr_completion #(.W(2*N)) u_done (.d_t(p_t), .d_f(p_f), .done_reset(done));

endmodule
