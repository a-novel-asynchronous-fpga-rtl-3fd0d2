`timescale 1ns/1ps
// tb_gapla_top: end-to-end test of the 2x2 array at its default sizes. The
// testbench configures the wrappers' register matrices, the switch boxes
// and the clock grouping, and plays the synchronous logic blocks: a sender
// raises out_en on its port's clock while it has words, a receiver raises
// in_en while it expects words and checks each word it takes. Every ring
// oscillator has its own period, so every flow crosses clock domains.
// Flows, run one phase after the other (island (r,c), wrapper N/E/S/W):
//   1 direct link  (0,0)E out0 -> (0,1)W in0, 32 bits; and
//     channel      (0,0)S out4 -> box(1,1) W->E -> (1,1)N in4, 16 bits
//   2 direct link  (0,1)S out1 -> (1,1)N in1, 16 bits
//   3 fanout       (0,0)S out5 -> box(1,1) fanout -> (1,1)N in5 and
//                  (1,0)N in5, 8 bits to both
//   4 arbiter      (0,0)S out6 and (0,1)S out6 compete -> (1,1)N in6
//   5 merge        (0,0)S out7 then (0,1)S out7 -> (1,1)N in7
//   6 fanin        (0,0)E out4 and (0,1)W out4 joined -> (1,1)W in4
// Island (1,1) groups its N and E wrappers into one clock domain.
// Counted and required at least once: words over direct links, words over
// a channel, fanout deliveries, arbitrated requests that met a competitor,
// merged events, joined fanin events, clock pauses of the generators,
// samples where the grouped clocks were checked equal, CDU clock checks.
module tb_gapla_top;
  import gapla_pkg::*;
  localparam int R = 2, C = 2, T = CHAN_PAIRS, WD = CHAN_BITS;
  localparam int NSRC = 4 * T + 14, NSNK = 4 * T + 26, SW = $clog2(NSRC), ST = 4 * T;
  localparam int N = 0, E = 1, S = 2, W = 3;
  localparam int NWORDS = 8;

  logic rst;
  logic [R-1:0][C-1:0][3:0][7:0] dly;
  logic [R-1:0][C-1:0][3:0] grp, err, lclk;
  logic [R-1:0][C-1:0][N_CDU-1:0][1:0] csel;
  logic [R-1:0][C-1:0][N_CDU-1:0] cclk;
  io_reg_cfg_t [R-1:0][C-1:0][3:0][N_IO_REGS-1:0] rcfg;
  logic [R:0][C:0][NSNK-1:0] b_en;
  logic [R:0][C:0][NSNK-1:0][SW-1:0] b_sel;
  logic [R:0][C:0][1:0][3:0] fo_m, fi_m, ar_m, mg_m;
  lrsb_cfg_t [R:0][C:0][3:0][WD-1:0] dcfg;
  logic [R-1:0][C-1:0][3:0][7:0] in_en, in_load, out_en, out_load;
  logic [R-1:0][C-1:0][3:0][N_IO_REGS-1:0] dout, din;

  gapla_top dut (
    .rst(rst), .dly_cfg(dly), .grp_en(grp), .cdu_sel(csel), .reg_cfg(rcfg), .cfg_err(err),
    .rsb_snk_en(b_en), .rsb_snk_sel(b_sel), .rsb_fanout_mask(fo_m), .rsb_fanin_mask(fi_m),
    .rsb_arb_mask(ar_m), .rsb_merge_mask(mg_m), .rsb_data_cfg(dcfg),
    .local_clk(lclk), .cdu_clk(cclk), .in_en(in_en), .in_load(in_load), .out_en(out_en),
    .out_load(out_load), .lb_dout(dout), .lb_din(din));

  int checks = 0, failures = 0;
  int phase;

  // ---------------------------------------------------------- port agents
  // per port: phase it runs in, words to move, data registers, flow id
  int s_ph [R][C][4][8], s_n [R][C][4][8], s_lo [R][C][4][8], s_wd [R][C][4][8], s_id [R][C][4][8];
  int r_ph [R][C][4][8], r_n [R][C][4][8], r_lo [R][C][4][8], r_wd [R][C][4][8], r_id [R][C][4][8];
  int s_k [R][C][4][8], r_k [R][C][4][8];
  logic [R-1:0][C-1:0][3:0][7:0] s_gate, r_got;

  function automatic logic [31:0] word(int id, int k);
    return 32'((id + 1) * 32'h9e3779b1 + k * 32'h85ebca6b) ^ 32'(k << 20);
  endfunction

  function automatic logic [31:0] mask_w(int wd);
    return (wd >= 32) ? 32'hffffffff : ((32'd1 << wd) - 1);
  endfunction

  always_comb begin
    dout = '0;
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) for (int w = 0; w < 4; w++)
      for (int p = 0; p < 8; p++) begin
        out_en[r][c][w][p] = !rst && phase == s_ph[r][c][w][p] && s_k[r][c][w][p] < s_n[r][c][w][p] && s_gate[r][c][w][p];
        in_en[r][c][w][p]  = !rst && phase == r_ph[r][c][w][p] && r_k[r][c][w][p] < r_n[r][c][w][p];
        for (int b = 0; b < 32; b++)
          if (b < s_wd[r][c][w][p]) dout[r][c][w][s_lo[r][c][w][p] + b] = word(s_id[r][c][w][p], s_k[r][c][w][p])[b];
      end
  end

  for (genvar r = 0; r < R; r++) begin : g_r
    for (genvar c = 0; c < C; c++) begin : g_c
      for (genvar w = 0; w < 4; w++) begin : g_w
        always @(posedge lclk[r][c][w]) begin
          for (int p = 0; p < 8; p++) begin
            if (out_en[r][c][w][p]) s_k[r][c][w][p] <= s_k[r][c][w][p] + 1;
            r_got[r][c][w][p] <= in_en[r][c][w][p] && in_load[r][c][w][p];
            if (in_en[r][c][w][p] && in_load[r][c][w][p]) r_k[r][c][w][p] <= r_k[r][c][w][p] + 1;
          end
        end
        always @(negedge lclk[r][c][w]) begin
          for (int p = 0; p < 8; p++) if (r_got[r][c][w][p] && r_wd[r][c][w][p] > 0) begin
            logic [31:0] got_w;
            got_w = '0;
            for (int b = 0; b < 32; b++)
              if (b < r_wd[r][c][w][p]) got_w[b] = din[r][c][w][r_lo[r][c][w][p] + b];
            checks++;
            if (got_w !== (word(r_id[r][c][w][p], r_k[r][c][w][p] - 1) & mask_w(r_wd[r][c][w][p]))) begin
              failures++;
              $display("(%0d,%0d) w%0d in%0d word %0d: %h", r, c, w, p, r_k[r][c][w][p] - 1, got_w);
            end
          end
        end
        // clock pauses granted by this wrapper's generator
        always @(dut.g_row[r].g_col[c].u_island.g_wrap[w].u_wrap.u_clkgen.ac)
          if (!rst && dut.g_row[r].g_col[c].u_island.g_wrap[w].u_wrap.u_clkgen.ac != '0) pauses++;
      end
    end
  end

  // ------------------------------------------------------------ mechanisms
  int pauses, contended, group_samples, cdu_samples;

  always @(out_ack[0][0][S][6], out_ack[0][1][S][6], dut.w_out_req[0][0][S][6], dut.w_out_req[0][1][S][6])
    if (!rst && (dut.w_out_req[0][0][S][6] != dut.w_out_ack[0][0][S][6]) &&
        (dut.w_out_req[0][1][S][6] != dut.w_out_ack[0][1][S][6])) contended++;
  logic [R-1:0][C-1:0][3:0][7:0] out_ack;
  assign out_ack = dut.w_out_ack;

  // ----------------------------------------------------------- configuration
  task automatic snd(int r, int c, int w, int p, int ph, int n, int lo, int wd, int id);
    s_ph[r][c][w][p] = ph; s_n[r][c][w][p] = n; s_lo[r][c][w][p] = lo; s_wd[r][c][w][p] = wd; s_id[r][c][w][p] = id;
    for (int b = lo; b < lo + wd; b++) rcfg[r][c][w][b] = '{used: 1'b1, dir_out: 1'b1, port: 3'(p)};
  endtask
  task automatic rcv(int r, int c, int w, int p, int ph, int n, int lo, int wd, int id);
    r_ph[r][c][w][p] = ph; r_n[r][c][w][p] = n; r_lo[r][c][w][p] = lo; r_wd[r][c][w][p] = wd; r_id[r][c][w][p] = id;
    for (int b = lo; b < lo + wd; b++) rcfg[r][c][w][b] = '{used: 1'b1, dir_out: 1'b0, port: 3'(p)};
  endtask
  task automatic route(int i, int j, int snk, int src);
    b_en[i][j][snk] = 1'b1;
    b_sel[i][j][snk] = SW'(src);
  endtask

  function automatic bit phase_done(int ph);
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) for (int w = 0; w < 4; w++)
      for (int p = 0; p < 8; p++) begin
        if (s_ph[r][c][w][p] == ph && s_k[r][c][w][p] < s_n[r][c][w][p]) return 0;
        if (r_ph[r][c][w][p] == ph && r_k[r][c][w][p] < r_n[r][c][w][p]) return 0;
      end
    return 1;
  endfunction

  initial begin
    #400000;
    failures++;
    $display("watchdog in phase %0d", phase);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int rx_direct, rx_channel, rx_fanout, rx_merge, rx_fanin, rx_arb;

  initial begin
    rst = 1; phase = 0;
    pauses = 0; contended = 0; group_samples = 0; cdu_samples = 0;
    rcfg = '0; b_en = '0; b_sel = '0; fo_m = '0; fi_m = '0; ar_m = '0; mg_m = '0; dcfg = '0;
    s_gate = '1;
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
      grp[r][c] = 4'b0000;
      for (int w = 0; w < 4; w++) begin
        dly[r][c][w] = 8'(20 + ((r * 4 + c * 2 + w) * 7) % 35);
        for (int p = 0; p < 8; p++) begin
          s_ph[r][c][w][p] = 0; s_n[r][c][w][p] = 0; s_lo[r][c][w][p] = 0; s_wd[r][c][w][p] = 0; s_id[r][c][w][p] = 0;
          r_ph[r][c][w][p] = 0; r_n[r][c][w][p] = 0; r_lo[r][c][w][p] = 0; r_wd[r][c][w][p] = 0; r_id[r][c][w][p] = 0;
          s_k[r][c][w][p] = 0; r_k[r][c][w][p] = 0;
        end
      end
      for (int u = 0; u < N_CDU; u++) csel[r][c][u] = 2'($urandom);
    end
    grp[1][1] = 4'b0001;  // island (1,1): N and E wrappers share a clock

    // phase 1: direct link and channel
    snd(0, 0, E, 0, 1, NWORDS, 0, 32, 1);   rcv(0, 1, W, 0, 1, NWORDS, 0, 32, 1);
    snd(0, 0, S, 4, 1, NWORDS, 64, 16, 3);  rcv(1, 1, N, 4, 1, NWORDS, 64, 16, 3);
    route(1, 1, E*T + 12, W*T + 0);
    for (int t = 0; t < 16; t++) dcfg[1][1][E][t] = '{en: 1'b1, from: 2'(W)};
    // phase 2: vertical direct link
    snd(0, 1, S, 1, 2, NWORDS, 32, 16, 2);  rcv(1, 1, N, 1, 2, NWORDS, 32, 16, 2);
    // phase 3: fanout to two islands
    snd(0, 0, S, 5, 3, NWORDS, 96, 8, 4);
    rcv(1, 1, N, 5, 3, NWORDS, 96, 8, 4);   rcv(1, 0, N, 5, 3, NWORDS, 96, 8, 4);
    route(1, 1, ST + 0, W*T + 1);
    route(1, 1, E*T + 13, ST + 0);
    route(1, 1, W*T + 13, ST + 1);
    fo_m[1][1][0] = 4'b0011;
    for (int t = 32; t < 40; t++) dcfg[1][1][E][t] = '{en: 1'b1, from: 2'(W)};
    // phase 4: arbiter
    snd(0, 0, S, 6, 4, NWORDS, 0, 0, 5);    snd(0, 1, S, 6, 4, NWORDS, 0, 0, 5);
    rcv(1, 1, N, 6, 4, 2 * NWORDS, 0, 0, 5);
    route(1, 1, ST + 10, W*T + 2);
    route(1, 1, ST + 11, E*T + 2);
    route(1, 1, E*T + 14, ST + 10);
    ar_m[1][1][0] = 4'b0011;
    // phase 5: merge, the second sender starts when the first is done
    snd(0, 0, S, 7, 5, NWORDS, 0, 0, 6);    snd(0, 1, S, 7, 5, NWORDS, 0, 0, 6);
    rcv(1, 1, N, 7, 5, 2 * NWORDS, 0, 0, 6);
    route(1, 1, ST + 18, W*T + 3);
    route(1, 1, ST + 19, E*T + 3);
    route(1, 1, E*T + 15, ST + 12);
    mg_m[1][1][0] = 4'b0011;
    // phase 6: fanin
    snd(0, 0, E, 4, 6, NWORDS, 0, 0, 7);    snd(0, 1, W, 4, 6, NWORDS, 0, 0, 7);
    rcv(1, 1, W, 4, 6, NWORDS, 0, 0, 7);
    route(1, 1, ST + 2, N*T + 0);
    route(1, 1, ST + 3, N*T + 8);
    route(1, 1, S*T + 12, ST + 8);
    fi_m[1][1][0] = 4'b0011;

    s_gate[0][1][S][7] = 1'b0;
    #30 rst = 0;
    for (int ph = 1; ph <= 6; ph++) begin
      phase = ph;
      while (!phase_done(ph)) begin
        #1.3;
        if (ph == 5) s_gate[0][1][S][7] = (r_k[1][1][N][7] >= NWORDS);
        if (lclk[1][1][N] === lclk[1][1][E]) group_samples++;
        else begin failures++; $display("grouped clocks of island (1,1) differ"); end
        checks++;
        for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) for (int u = 0; u < N_CDU; u++) begin
          if (cclk[r][c][u] !== lclk[r][c][csel[r][c][u]]) begin failures++; $display("cdu clock"); end
          cdu_samples++;
        end
        checks++;
      end
      #40;
    end

    rx_direct  = r_k[0][1][W][0] + r_k[1][1][N][1];
    rx_channel = r_k[1][1][N][4];
    rx_fanout  = r_k[1][1][N][5] + r_k[1][0][N][5];
    rx_arb     = r_k[1][1][N][6];
    rx_merge   = r_k[1][1][N][7];
    rx_fanin   = r_k[1][1][W][4];
    $display("direct %0d channel %0d fanout %0d arbiter %0d (contended %0d) merge %0d fanin %0d pauses %0d group %0d cdu %0d",
             rx_direct, rx_channel, rx_fanout, rx_arb, contended, rx_merge, rx_fanin, pauses, group_samples, cdu_samples);
    checks++; if (rx_direct  != 2 * NWORDS) begin failures++; $display("direct-link words missing"); end
    checks++; if (rx_channel != NWORDS)     begin failures++; $display("channel words missing"); end
    checks++; if (rx_fanout  != 2 * NWORDS) begin failures++; $display("fanout deliveries missing"); end
    checks++; if (rx_arb     != 2 * NWORDS) begin failures++; $display("arbitrated events missing"); end
    checks++; if (contended  == 0)          begin failures++; $display("the arbiter never saw competing requests"); end
    checks++; if (rx_merge   != 2 * NWORDS) begin failures++; $display("merged events missing"); end
    checks++; if (rx_fanin   != NWORDS)     begin failures++; $display("fanin events missing"); end
    checks++; if (pauses     == 0)          begin failures++; $display("no clock pause happened"); end
    checks++; if (group_samples == 0)       begin failures++; $display("grouping never checked"); end
    checks++; if (err != '0)                begin failures++; $display("cfg_err"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
