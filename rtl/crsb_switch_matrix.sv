`timescale 1ns/1ps
// crsb_switch_matrix: the central switch matrix of a control routing switch
// box. It routes 2-phase handshake pairs: every sink endpoint (a channel
// track leaving the box, or an input of a fanin/fanout, arbiter or merge
// module) is configured with the source endpoint it takes its request from
// (a track entering the box, or a module output). The acknowledge travels
// the same path backwards: a source's ack is the ack of the sink that
// selected it. One source may feed only one sink (one-to-many needs a
// fanout module); this is checked by an assertion. The per-sink select is
// this design's encoding of the programmable matrix. Combinational.
module crsb_switch_matrix #(
  parameter int unsigned NSRC = 142,
  parameter int unsigned NSNK = 154,
  localparam int unsigned SW  = $clog2(NSRC)
) (
  input  logic [NSNK-1:0]         snk_en,
  input  logic [NSNK-1:0][SW-1:0] snk_sel,
  input  logic [NSRC-1:0]         src_req,
  output logic [NSRC-1:0]         src_ack,
  output logic [NSNK-1:0]         snk_req,
  input  logic [NSNK-1:0]         snk_ack
);

  always_comb begin
    for (int j = 0; j < NSNK; j++)
      snk_req[j] = snk_en[j] && (32'(snk_sel[j]) < NSRC) && src_req[snk_sel[j]];
  end

  logic [NSRC-1:0] used;
  logic            shared;  // configuration error: a source feeds two sinks

  always_comb begin
    src_ack = '0;
    used    = '0;
    shared  = 1'b0;
    for (int j = 0; j < NSNK; j++) begin
      if (snk_en[j] && (32'(snk_sel[j]) < NSRC)) begin
        shared            = shared | used[snk_sel[j]];
        used[snk_sel[j]]  = 1'b1;
        src_ack[snk_sel[j]] = src_ack[snk_sel[j]] | snk_ack[j];
      end
    end
  end

  always_comb
    assert (!shared) else $error("crsb_switch_matrix: a source is selected by two sinks");

endmodule
