// dr_demux: one output branch of a dual-rail demultiplexer.
//
// Both rails of every bit are passed through a C-element together with a
// select wire (one rail of a dual-rail select, or one minterm line of a
// decoded code). Only the branch whose select is high ever sees valid data;
// all other branches stay empty, so the function blocks behind them do no
// work. A full demultiplexer is one instance per branch sharing the input.
//
// Interface: in (W-bit dual-rail), sel (single wire) in; y out.
// Timing: y is valid once in and sel are, empty once both have fallen.
module dr_demux #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] in_t, in_f,
  input  logic         sel,
  output logic [W-1:0] y_t, y_f
);

  c_element #(.N(2), .W(W)) u_t (.in({in_t, {W{sel}}}), .y(y_t));
  c_element #(.N(2), .W(W)) u_f (.in({in_f, {W{sel}}}), .y(y_f));

endmodule
