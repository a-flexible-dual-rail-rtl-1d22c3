// dr_pipeline: STAGES-deep, W-bit wide 4-phase dual-rail Muller pipeline
// without processing (the pipeline style the ALU's handshake builds on).
//
// Stage k's latch takes the word of stage k-1 and the acknowledge of stage
// k+1; its own acknowledge goes back to stage k-1. Valid words and empty
// spacers alternate through the stages; a full pipeline holds at most one
// valid word per two stages. Defaults are the 3-stage pipeline and the 3-bit
// latch of the example figures.
//
// Interface: in (dual-rail word) from the sender and in_ack back to it;
// out (dual-rail word) to the receiver and out_ack from it; rst clears every
// stage to empty (hold it while the sender is empty and out_ack is low).
// Timing: no clock; throughput and latency set by the handshakes. The
// acknowledge wires form the loops a Muller pipeline is made of; they are
// reported by lint tools as circular combinational logic and are intended.
module dr_pipeline #(
  parameter int unsigned STAGES = 3,
  parameter int unsigned W      = 3
) (
  input  logic         rst,
  input  logic [W-1:0] in_t, in_f,
  output logic         in_ack,
  output logic [W-1:0] out_t, out_f,
  input  logic         out_ack
);

  logic [STAGES:0][W-1:0] d_t, d_f;   // d[k]: input of stage k (d[STAGES] = out)
  logic [STAGES:0]        ack;        // ack[k]: acknowledge of stage k (ack[STAGES] = out_ack)

  assign d_t[0] = in_t;
  assign d_f[0] = in_f;
  assign ack[STAGES] = out_ack;

  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    dr_latch_stage #(.W(W)) u_st (
      .rst,
      .di_t(d_t[k]), .di_f(d_f[k]), .ack_i(ack[k+1]),
      .do_t(d_t[k+1]), .do_f(d_f[k+1]), .ack_o(ack[k])
    );
  end

  assign in_ack = ack[0];
  assign out_t  = d_t[STAGES];
  assign out_f  = d_f[STAGES];

endmodule
