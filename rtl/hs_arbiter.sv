`timescale 1ns/1ps
// hs_arbiter: programmable 4-input arbiter of 2-phase handshake pairs,
// placed along the routing channels of the control switch box. Senders
// enabled in mask may make request events at any time; one at a time is
// passed to the single destination. An input is pending while its req
// differs from its ack. Pending inputs compete in a tree of mutual
// exclusion elements (inputs 0/1 and 2/3, then the two pairs). The winner's
// forward latch copies its req, which toggles the output request (the XOR
// of all forward latches); when the destination acknowledges, the winner's
// ack latch copies the forwarded value, the input is no longer pending and
// its grant is released for the next one. The tree and latch structure are
// this design's; 4 inputs is the module size of the switch box.
// No clock; rst clears all latches and grants.
// Tools report a combinational loop through the ME elements (each grant
// feeds the pending logic of the next level, and grants return into the
// cross-coupled ME model); it is the arbiter's asynchronous state, held
// by the latches and ME elements, not a mistake.
module hs_arbiter (
  input  logic       rst,
  input  logic [3:0] mask,
  input  logic [3:0] req_in,
  output logic [3:0] ack_in,
  output logic       req_out,
  input  logic       ack_out
);

  logic [3:0] pending;
  logic [3:0] g_leaf;
  logic [1:0] g_top;
  logic [3:0] grant;
  logic [3:0] fwd;
  logic       idle;

  assign pending = (req_in ^ ack_in) & mask;

  mutex u_me01 (.rst(rst), .r(pending[1:0]), .g(g_leaf[1:0]));
  mutex u_me23 (.rst(rst), .r(pending[3:2]), .g(g_leaf[3:2]));
  mutex u_metop (.rst(rst), .r({|g_leaf[3:2], |g_leaf[1:0]}), .g(g_top));

  assign grant = g_leaf & {{2{g_top[1]}}, {2{g_top[0]}}};

  // forward latch: the granted input's request goes to the destination
  always_latch begin
    if (rst) begin
      fwd = '0;
    end else begin
      for (int i = 0; i < 4; i++)
        if (grant[i]) fwd[i] = req_in[i];
    end
  end

  assign req_out = ^fwd;
  assign idle    = (req_out == ack_out);

  // acknowledge latch: returned once the destination has acknowledged
  always_latch begin
    if (rst) begin
      ack_in = '0;
    end else begin
      for (int i = 0; i < 4; i++)
        if (grant[i] && idle) ack_in[i] = fwd[i];
    end
  end

endmodule
