`timescale 1ns/1ps
// lrsb: data (logic) routing switch box at a channel crossing, a
// conventional FPGA switch box. It is built here as a disjoint switch box:
// data track t leaving on side d is driven, when enabled, by track t
// entering on the configured side (lrsb_cfg_t), and is low otherwise.
// Wires are split into an entering and a leaving direction per side so
// that no tri-state nets are needed. The disjoint pattern and the split
// wires are this design's; 256 data tracks per channel is the
// architecture's. Combinational; configuration is static.
module lrsb
  import gapla_pkg::*;
#(
  parameter int unsigned WIDTH = CHAN_BITS
) (
  input  lrsb_cfg_t [3:0][WIDTH-1:0] cfg,
  input  logic      [3:0][WIDTH-1:0] din,   // data entering the box
  output logic      [3:0][WIDTH-1:0] dout   // data leaving the box
);

  always_comb begin
    for (int d = 0; d < 4; d++)
      for (int t = 0; t < WIDTH; t++)
        dout[d][t] = cfg[d][t].en && din[cfg[d][t].from][t];
  end

endmodule
