`timescale 1ns/1ps
// hs_fanin: programmable many-to-one fanin of 2-phase handshake pairs,
// placed along the routing channels of the control switch box. The single
// request event on req_out is made only when every sender enabled in mask
// has made its request event (a masked C-element over their req wires);
// the receiver's acknowledge is returned to every enabled sender. Disabled
// inputs are ignored and see ack low. mask is static configuration. With
// N=4 it is the 4-input module of the switch box; the masked C-element is
// this design's way of making it programmable. No clock; rst clears it.
// The C-element is a latch by design (holds while the senders disagree).
module hs_fanin #(
  parameter int unsigned N = 4
) (
  input  logic         rst,
  input  logic [N-1:0] mask,
  input  logic [N-1:0] req_in,
  output logic [N-1:0] ack_in,
  output logic         req_out,
  input  logic         ack_out
);

  always_latch begin
    if (rst || mask == '0)
      req_out = 1'b0;
    else if ((req_in | ~mask) == '1)
      req_out = 1'b1;
    else if ((req_in & mask) == '0)
      req_out = 1'b0;
  end

  assign ack_in = mask & {N{ack_out}};

endmodule
