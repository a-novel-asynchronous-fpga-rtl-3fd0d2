`timescale 1ns/1ps
// hs_merge: programmable merge of 2-phase handshake pairs, placed along the
// routing channels of the control switch box. Senders enabled in mask take
// turns on one destination without arbitration: their request events are
// merged by an XOR into the output request, so the senders must never be
// active at the same time (the arbiter is for senders that may compete).
// When the destination acknowledges (req_out equals ack_out again), the
// acknowledge latch of each enabled input becomes transparent and the
// sender whose request changed sees its acknowledge event. Disabled inputs
// are ignored. The XOR merge and the latch form are this design's; N=4 is
// the module size of the switch box. No clock; rst clears the latches.
module hs_merge #(
  parameter int unsigned N = 4
) (
  input  logic         rst,
  input  logic [N-1:0] mask,
  input  logic [N-1:0] req_in,
  output logic [N-1:0] ack_in,
  output logic         req_out,
  input  logic         ack_out
);

  assign req_out = ^(req_in & mask);

  always_latch begin
    if (rst)
      ack_in = '0;
    else if (req_out == ack_out)
      ack_in = req_in & mask;
  end

endmodule
