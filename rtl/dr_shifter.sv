// dr_shifter: W-bit dual-rail logarithmic shifter / rotator, one direction.
//
// LEFT = 0 builds the right shifter/rotator of the design: log2(W) stages,
// the stage controlled by shift-amount bit b[k] moving the data by 2^k places
// (widest stage first). Every bit of a stage is a dual-rail 2:1 multiplexer
// steered by b[k]. The 2^k bits entering from beyond the word come from extra
// multiplexers that choose, by `rot`, between the fill bit s (rotate = 0) and
// the 2^k low-order bits of the stage input (rotate = 1); s itself is 0 for a
// logical and the sign bit a[W-1] for an arithmetic shift (`ari`).
// LEFT = 1 is the mirror image for left shifts and rotates: the fill is 0 or
// the high-order bits, and for an arithmetic left shift a last multiplexer
// puts a[W-1] back into the sign position, as the design's operation table
// defines (shift left arithmetic keeps the sign bit).
// rot = ari = 1 is not a defined operation; it gives a rotate (right) or a
// rotate with the sign bit kept (left).
//
// Interface: a (W-bit dual-rail data), b (log2(W)-bit dual-rail amount),
// ari, rot (dual-rail controls) in; r (W-bit dual-rail) out. W must be a
// power of two.
// Timing: log2(W) multiplexer levels (plus the fill multiplexers).
module dr_shifter #(
  parameter int unsigned W    = 32,
  parameter bit          LEFT = 1'b0
) (
  input  logic [W-1:0]         a_t, a_f,
  input  logic [$clog2(W)-1:0] b_t, b_f,
  input  logic                 ari_t, ari_f,
  input  logic                 rot_t, rot_f,
  output logic [W-1:0]         r_t, r_f
);

  localparam int unsigned L = $clog2(W);

  // d[L] is the input, d[k] the output of the stage steered by b[k]
  logic [L:0][W-1:0] d_t, d_f;
  assign d_t[L] = a_t;
  assign d_f[L] = a_f;

  // fill bit of the right shifter: 0 or the sign bit (left fills with 0)
  if (!LEFT) begin : g_sfill
    logic s_t, s_f;
    dr_zmux u_s (.x_t(a_t[W-1]), .x_f(a_f[W-1]), .sel_t(ari_t), .sel_f(ari_f),
                 .y_t(s_t), .y_f(s_f));
  end

  for (genvar k = L-1; k >= 0; k--) begin : g_stage
    localparam int unsigned SH = 1 << k;
    logic [W-1:0] in1_t, in1_f;   // data shifted by SH places
    for (genvar i = 0; i < W; i++) begin : g_bit
      if (!LEFT && i + SH < W) begin : g_r_in
        assign in1_t[i] = d_t[k+1][i+SH];
        assign in1_f[i] = d_f[k+1][i+SH];
      end else if (!LEFT) begin : g_r_fill
        dr_mux #(.W(1)) u_f (
          .in0_t(g_sfill.s_t), .in0_f(g_sfill.s_f),
          .in1_t(d_t[k+1][i+SH-W]), .in1_f(d_f[k+1][i+SH-W]),
          .sel_t(rot_t), .sel_f(rot_f),
          .y_t(in1_t[i]), .y_f(in1_f[i])
        );
      end else if (i >= SH) begin : g_l_in
        assign in1_t[i] = d_t[k+1][i-SH];
        assign in1_f[i] = d_f[k+1][i-SH];
      end else begin : g_l_fill
        dr_zmux u_f (
          .x_t(d_t[k+1][i+W-SH]), .x_f(d_f[k+1][i+W-SH]),
          .sel_t(rot_t), .sel_f(rot_f),
          .y_t(in1_t[i]), .y_f(in1_f[i])
        );
      end
    end
    dr_mux #(.W(W)) u_m (
      .in0_t(d_t[k+1]), .in0_f(d_f[k+1]),
      .in1_t(in1_t), .in1_f(in1_f),
      .sel_t(b_t[k]), .sel_f(b_f[k]),
      .y_t(d_t[k]), .y_f(d_f[k])
    );
  end

  if (!LEFT) begin : g_r_out
    assign r_t = d_t[0];
    assign r_f = d_f[0];
  end else begin : g_l_out
    // arithmetic left shift keeps the sign bit
    dr_mux #(.W(1)) u_sign (
      .in0_t(d_t[0][W-1]), .in0_f(d_f[0][W-1]),
      .in1_t(a_t[W-1]), .in1_f(a_f[W-1]),
      .sel_t(ari_t), .sel_f(ari_f),
      .y_t(r_t[W-1]), .y_f(r_f[W-1])
    );
    assign r_t[W-2:0] = d_t[0][W-2:0];
    assign r_f[W-2:0] = d_f[0][W-2:0];
  end

endmodule
