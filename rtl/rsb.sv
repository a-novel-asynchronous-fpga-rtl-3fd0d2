`timescale 1ns/1ps
// rsb: routing switch box at the crossing of a horizontal and a vertical
// global routing channel. It has two parts: the control part (crsb)
// switches the 2-phase handshake pairs and provides fanin/fanout,
// arbitration and merge; the logic part (lrsb) switches the bundled data
// wires. Sides are numbered 0 north, 1 east, 2 south, 3 west. No clock;
// all configuration is static.
// Latches and loops reported here are those of the control switch box's
// handshake modules; see crsb.
module rsb
  import gapla_pkg::*;
#(
  parameter int unsigned TRACKS = CHAN_PAIRS,
  parameter int unsigned WIDTH  = CHAN_BITS,
  localparam int unsigned NSRC = 4 * TRACKS + 14,
  localparam int unsigned NSNK = 4 * TRACKS + 26,
  localparam int unsigned SW   = $clog2(NSRC)
) (
  input  logic                        rst,
  input  logic [NSNK-1:0]             snk_en,
  input  logic [NSNK-1:0][SW-1:0]     snk_sel,
  input  logic [1:0][3:0]             fanout_mask,
  input  logic [1:0][3:0]             fanin_mask,
  input  logic [1:0][3:0]             arb_mask,
  input  logic [1:0][3:0]             merge_mask,
  input  lrsb_cfg_t [3:0][WIDTH-1:0]  data_cfg,
  input  logic [3:0][TRACKS-1:0]      in_req,
  output logic [3:0][TRACKS-1:0]      in_ack,
  output logic [3:0][TRACKS-1:0]      out_req,
  input  logic [3:0][TRACKS-1:0]      out_ack,
  input  logic [3:0][WIDTH-1:0]       din,
  output logic [3:0][WIDTH-1:0]       dout
);

  crsb #(.TRACKS(TRACKS)) u_crsb (
    .rst         (rst),
    .snk_en      (snk_en),
    .snk_sel     (snk_sel),
    .fanout_mask (fanout_mask),
    .fanin_mask  (fanin_mask),
    .arb_mask    (arb_mask),
    .merge_mask  (merge_mask),
    .in_req      (in_req),
    .in_ack      (in_ack),
    .out_req     (out_req),
    .out_ack     (out_ack)
  );

  lrsb #(.WIDTH(WIDTH)) u_lrsb (
    .cfg  (data_cfg),
    .din  (din),
    .dout (dout)
  );

endmodule
