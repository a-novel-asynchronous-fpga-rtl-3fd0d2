`timescale 1ns/1ps
// hs_fanout: programmable one-to-many fanout of a 2-phase handshake pair,
// placed along the routing channels of the control switch box. A request
// event on req_in is copied to every output enabled in mask; the
// acknowledge event goes back on ack_in only when every enabled output has
// acknowledged, which a masked C-element over their ack wires detects.
// Disabled outputs hold req low and their ack is ignored. mask is static
// configuration. With N=4 it is the 4-input module of the switch box; the
// masked C-element is this design's way of making the join programmable.
// No clock; rst (active high) clears the join.
// The C-element is a latch by design (holds while the receivers disagree).
module hs_fanout #(
  parameter int unsigned N = 4
) (
  input  logic         rst,
  input  logic [N-1:0] mask,
  input  logic         req_in,
  output logic         ack_in,
  output logic [N-1:0] req_out,
  input  logic [N-1:0] ack_out
);

  assign req_out = mask & {N{req_in}};

  // masked C-element: all enabled acks high -> 1, all enabled acks low -> 0
  always_latch begin
    if (rst || mask == '0)
      ack_in = 1'b0;
    else if ((ack_out | ~mask) == '1)
      ack_in = 1'b1;
    else if ((ack_out & mask) == '0)
      ack_in = 1'b0;
  end

endmodule
