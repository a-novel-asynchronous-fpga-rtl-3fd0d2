`timescale 1ns/1ps
// tb_rsb: a routing switch box at full size carrying a bundled-data
// channel around a corner: the pair on west track 3 leaves on south track
// 9, and data tracks 130..145 entering from the west leave on the south
// side. The sender sets a random 16-bit word, then makes a request event;
// the receiver on the south side reads the data at each request event and
// acknowledges. Checks: every word arrives intact with its request; other
// leaving data tracks stay low.
module tb_rsb;
  import gapla_pkg::*;
  localparam int T = CHAN_PAIRS, WD = CHAN_BITS, NSRC = 4 * T + 14, NSNK = 4 * T + 26, SW = $clog2(NSRC);
  localparam int D0 = 130;

  logic rst;
  logic [NSNK-1:0] en;
  logic [NSNK-1:0][SW-1:0] sel;
  logic [1:0][3:0] m0;
  lrsb_cfg_t [3:0][WD-1:0] dcfg;
  logic [3:0][T-1:0] in_req, in_ack, out_req, out_ack;
  logic [3:0][WD-1:0] din, dout;
  logic [15:0] word;
  int checks = 0, failures = 0;

  rsb dut (.rst(rst), .snk_en(en), .snk_sel(sel), .fanout_mask(m0), .fanin_mask(m0), .arb_mask(m0),
    .merge_mask(m0), .data_cfg(dcfg), .in_req(in_req), .in_ack(in_ack), .out_req(out_req), .out_ack(out_ack),
    .din(din), .dout(dout));

  always @(out_req[2][9]) if (!rst) begin
    checks++;
    if (dout[2][D0 +: 16] !== word) begin failures++; $display("data %h expected %h", dout[2][D0 +: 16], word); end
    checks++;
    if ((dout[2] & ~({{(WD-16){1'b0}}, 16'hffff} << D0)) != '0) begin failures++; $display("stray data"); end
    #($urandom_range(1, 5));
    out_ack[2][9] = out_req[2][9];
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; en = '0; sel = '0; m0 = '0; in_req = '0; out_ack = '0; din = '0; dcfg = '0;
    en[2*T + 9] = 1'b1; sel[2*T + 9] = SW'(3*T + 3);
    for (int t = D0; t < D0 + 16; t++) dcfg[2][t] = '{en: 1'b1, from: 2'd3};
    #5 rst = 0;
    for (int k = 0; k < 50; k++) begin
      word = 16'($urandom);
      din[3] = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      din[3][D0 +: 16] = word;
      #1 in_req[3][3] = ~in_req[3][3];
      wait (in_ack[3][3] == in_req[3][3]);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
