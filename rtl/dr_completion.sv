// dr_completion: completion detector for a W-bit dual-rail word.
//
// Each bit's two rails are ORed into an acknowledge Ack_i (1 = the bit holds
// a value). A W-input AND of the acks says the computation is done (all bits
// valid), a W-input OR says some bit has not yet reset. A C-element joins
// the two: DoneReset rises when every bit is valid and falls only when every
// bit is empty again, so it is the 4-phase request/acknowledge of the word.
//
// Interface: d (W-bit dual-rail) in; done_reset out.
// Timing: combinational with C-element state.
module dr_completion #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] d_t, d_f,
  output logic         done_reset
);

  logic [W-1:0] ack;
  logic         done, rst_n;

  assign ack   = d_t | d_f;
  assign done  = &ack;
  assign rst_n = |ack;

  c_element #(.N(2), .W(1)) u_c (.in({done, rst_n}), .y(done_reset));

endmodule
