// dr_latch_stage: one stage of a 4-phase dual-rail Muller pipeline: a W-bit
// dual-rail latch with completion detection.
//
// Every rail of every bit is a C-element joining the incoming rail with the
// inverted acknowledge of the next stage, so a stage copies a valid word only
// after the next stage has acknowledged the previous empty word, and an empty
// word only after it acknowledged the previous valid one. A completion
// detector (OR per bit, all-valid / all-empty C-element) on the stored word
// is the acknowledge sent back to the previous stage.
// The synchronous reset input `rst` is this design's own addition: while it
// is high both inputs of every C-element are held at 0, which clears the
// stage to empty (the C-elements have no reset of their own).
//
// Interface: di (W-bit dual-rail) and ack_i (from the next stage) in;
// dout (W-bit dual-rail) and ack_o (to the previous stage) out; rst.
// Timing: no clock; each stage reacts when its inputs allow.
// The acknowledge of a stage depends on its own outputs and steers the stage
// before it, whose output feeds this stage: in a pipeline this is a genuine
// feedback loop through C-elements (the handshake itself), which lint tools
// report as circular combinational logic. It settles, because each C-element
// changes only when all of its inputs agree.
module dr_latch_stage #(
  parameter int unsigned W = 3
) (
  input  logic         rst,
  input  logic [W-1:0] di_t, di_f,
  input  logic         ack_i,
  output logic [W-1:0] do_t, do_f,
  output logic         ack_o
);

  logic [W-1:0] en, gi_t, gi_f;

  assign en   = {W{~ack_i & ~rst}};
  assign gi_t = di_t & {W{~rst}};
  assign gi_f = di_f & {W{~rst}};

  c_element #(.N(2), .W(W)) u_t (.in({gi_t, en}), .y(do_t));
  c_element #(.N(2), .W(W)) u_f (.in({gi_f, en}), .y(do_f));

  dr_completion #(.W(W)) u_cd (.d_t(do_t), .d_f(do_f), .done_reset(ack_o));

endmodule
