`timescale 1ns/1ps
// crsb: control routing switch box at a channel crossing. It switches the
// handshake pairs of the four channels meeting there (TRACKS pairs per
// side) through a central switch matrix, and adds the functions a
// handshake needs beyond switching: two 4-output fanout and two 4-input
// fanin modules (one-to-many and many-to-one), two 4-input arbiters
// (competing senders, one destination) and two 4-input merges. The
// modules hang on the switch matrix, so any track can reach them, and
// several can be chained through it to build wider modules.
// Endpoint numbering (this design's): side d track t is endpoint d*TRACKS+t
// both as a source (the pair entering the box on that track) and as a sink
// (the pair leaving it). Sources after the tracks: fanout 0 outputs 0..3,
// fanout 1 outputs 0..3, fanin 0, fanin 1, arbiter 0, arbiter 1, merge 0,
// merge 1. Sinks after the tracks: fanout 0 input, fanout 1 input, fanin 0
// inputs 0..3, fanin 1 inputs, arbiter 0 inputs, arbiter 1 inputs, merge 0
// inputs, merge 1 inputs. The module counts and sizes and 32 pairs per
// channel are the architecture's. All configuration is static. No clock.
// Tools report a combinational loop through the source acknowledges: a
// handshake pair routed through the matrix into a module and back out to
// the matrix closes a path from acknowledge to request through the
// module's latches and ME elements. The loop is broken by those latches
// (asynchronous state), which is the intended circuit; the latch bits
// reported are the modules' C-elements, forward/ack latches and grants.
module crsb
  import gapla_pkg::*;
#(
  parameter int unsigned TRACKS = CHAN_PAIRS,
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
  // pairs entering the box
  input  logic [3:0][TRACKS-1:0]      in_req,
  output logic [3:0][TRACKS-1:0]      in_ack,
  // pairs leaving the box
  output logic [3:0][TRACKS-1:0]      out_req,
  input  logic [3:0][TRACKS-1:0]      out_ack
);

  localparam int unsigned ST = 4 * TRACKS;  // first module endpoint

  logic [NSRC-1:0] src_req, src_ack;
  logic [NSNK-1:0] snk_req, snk_ack;

  assign src_req[ST-1:0] = in_req;
  assign in_ack          = src_ack[ST-1:0];
  assign out_req         = snk_req[ST-1:0];
  assign snk_ack[ST-1:0] = out_ack;

  crsb_switch_matrix #(.NSRC(NSRC), .NSNK(NSNK)) u_matrix (
    .snk_en  (snk_en),
    .snk_sel (snk_sel),
    .src_req (src_req),
    .src_ack (src_ack),
    .snk_req (snk_req),
    .snk_ack (snk_ack)
  );

  for (genvar m = 0; m < 2; m++) begin : g_mod
    hs_fanout #(.N(4)) u_fanout (
      .rst     (rst),
      .mask    (fanout_mask[m]),
      .req_in  (snk_req[ST + m]),
      .ack_in  (snk_ack[ST + m]),
      .req_out (src_req[ST + 4*m +: 4]),
      .ack_out (src_ack[ST + 4*m +: 4])
    );

    hs_fanin #(.N(4)) u_fanin (
      .rst     (rst),
      .mask    (fanin_mask[m]),
      .req_in  (snk_req[ST + 2 + 4*m +: 4]),
      .ack_in  (snk_ack[ST + 2 + 4*m +: 4]),
      .req_out (src_req[ST + 8 + m]),
      .ack_out (src_ack[ST + 8 + m])
    );

    hs_arbiter u_arb (
      .rst     (rst),
      .mask    (arb_mask[m]),
      .req_in  (snk_req[ST + 10 + 4*m +: 4]),
      .ack_in  (snk_ack[ST + 10 + 4*m +: 4]),
      .req_out (src_req[ST + 10 + m]),
      .ack_out (src_ack[ST + 10 + m])
    );

    hs_merge #(.N(4)) u_merge (
      .rst     (rst),
      .mask    (merge_mask[m]),
      .req_in  (snk_req[ST + 18 + 4*m +: 4]),
      .ack_in  (snk_ack[ST + 18 + 4*m +: 4]),
      .req_out (src_req[ST + 12 + m]),
      .ack_out (src_ack[ST + 12 + m])
    );
  end

endmodule
