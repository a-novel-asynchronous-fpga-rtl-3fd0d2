`timescale 1ns/1ps
// tb_des_pipeline: a pipelined block cipher mapped onto the 2x2 array the
// way a fully pipelined DES is partitioned: the 16 Feistel rounds are split
// into three partitions (6, 5 and 5 rounds), each in its own island and
// clock domain, and 64-bit blocks flow between them over direct links.
//   island (0,0): makes plaintext blocks, rounds 0..5, sends E out0
//   island (0,1): W in0 -> rounds 6..10 -> S out0 (W and S wrappers grouped)
//   island (1,1): N in0 -> rounds 11..15 -> W out0 (N and W grouped)
//   island (1,0): E in0, swaps the halves and checks the ciphertext
// Every link is a 64-bit port: the port owns all 64 direct-link data
// registers. The testbench plays the logic blocks; the round function is a
// simple stand-in for the DES f-function (rotate, add the round key, XOR)
// with fixed round keys standing in for the subkey schedule, since the
// synchronous logic is not part of the RTL. Each island runs at its own
// ring period. Checks: every block arrives once, in order, with the
// ciphertext a reference model computes; the stages overlap (several
// blocks are in flight at once); the generators paused; the grouped
// wrappers ran on one clock. Prints throughput and latency.
module tb_des_pipeline;
  import gapla_pkg::*;
  localparam int R = 2, C = 2, T = CHAN_PAIRS, WD = CHAN_BITS;
  localparam int NSRC = 4 * T + 14, NSNK = 4 * T + 26, SW = $clog2(NSRC);
  localparam int N = 0, E = 1, S = 2, W = 3;
  localparam int NB = 40;

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

  // ----------------------------------------------------- cipher reference
  function automatic logic [31:0] rkey(int i);
    return 32'(32'h0f1e2d3c * (i + 1)) ^ 32'(i << 24);
  endfunction
  function automatic logic [31:0] f(logic [31:0] r, logic [31:0] k);
    return {r[26:0], r[31:27]} ^ (r + k);
  endfunction
  function automatic logic [63:0] rounds(logic [63:0] x, int first, int last);
    logic [31:0] l, r, t;
    {l, r} = x;
    for (int i = first; i <= last; i++) begin
      t = r;
      r = l ^ f(r, rkey(i));
      l = t;
    end
    return {l, r};
  endfunction
  function automatic logic [63:0] plain(int k);
    return {32'(k * 32'h9e3779b1), 32'(k) ^ 32'h5a5a0000};
  endfunction
  function automatic logic [63:0] cipher(int k);
    logic [63:0] x;
    x = rounds(plain(k), 0, 15);
    return {x[31:0], x[63:32]};
  endfunction

  // ------------------------------------------------------- pipeline stages
  logic got1, have1, got2, have2, got3;
  logic [63:0] y1, y2;
  int k0, k1, k2, k3;

  // stage 0: source in island (0,0), east wrapper
  realtime t_sent [NB];
  always_comb begin
    in_en  = '0;
    out_en = '0;
    out_en[0][0][E][0] = !rst && k0 < NB;
    in_en[0][1][W][0]  = !rst && !have1 && !got1 && k1 < NB;
    out_en[0][1][S][0] = have1;
    in_en[1][1][N][0]  = !rst && !have2 && !got2 && k2 < NB;
    out_en[1][1][W][0] = have2;
    in_en[1][0][E][0]  = !rst && !got3 && k3 < NB;
    dout = '0;
    dout[0][0][E][63:0] = rounds(plain(k0), 0, 5);
    dout[0][1][S][63:0] = y1;
    dout[1][1][W][63:0] = y2;
  end
  always @(posedge lclk[0][0][E]) if (out_en[0][0][E][0]) begin
    t_sent[k0] = $realtime;
    k0 <= k0 + 1;
  end

  // stage 1: island (0,1), in on W port 0, out on S port 0, one clock
  always @(posedge lclk[0][1][W]) begin
    got1 <= in_en[0][1][W][0] && in_load[0][1][W][0];
    if (out_en[0][1][S][0]) have1 <= 1'b0;
  end
  always @(negedge lclk[0][1][W]) if (got1) begin
    y1 = rounds(din[0][1][W][63:0], 6, 10);
    have1 = 1'b1;
    k1++;
  end

  // stage 2: island (1,1), in on N port 0, out on W port 0, one clock
  always @(posedge lclk[1][1][N]) begin
    got2 <= in_en[1][1][N][0] && in_load[1][1][N][0];
    if (out_en[1][1][W][0]) have2 <= 1'b0;
  end
  always @(negedge lclk[1][1][N]) if (got2) begin
    y2 = rounds(din[1][1][N][63:0], 11, 15);
    have2 = 1'b1;
    k2++;
  end

  // sink: island (1,0), in on E port 0
  int in_flight_max;
  realtime t_first, t_last, lat_sum;
  always @(posedge lclk[1][0][E]) got3 <= in_en[1][0][E][0] && in_load[1][0][E][0];
  always @(negedge lclk[1][0][E]) if (got3) begin
    logic [63:0] x;
    x = din[1][0][E][63:0];
    checks++;
    if ({x[31:0], x[63:32]} !== cipher(k3)) begin
      failures++;
      $display("block %0d: got %h expected %h", k3, {x[31:0], x[63:32]}, cipher(k3));
    end
    if (k3 == 0) t_first = $realtime;
    t_last = $realtime;
    lat_sum += $realtime - t_sent[k3];
    k3++;
  end
  always @(k0 or k3) if (k0 - k3 > in_flight_max) in_flight_max = k0 - k3;

  // mechanisms: pauses of the stage generators, grouped clocks equal
  int pauses, group_samples;
  always @(dut.g_row[0].g_col[1].u_island.g_wrap[2].u_wrap.u_clkgen.ac or
           dut.g_row[1].g_col[1].u_island.g_wrap[3].u_wrap.u_clkgen.ac or
           dut.g_row[1].g_col[0].u_island.g_wrap[1].u_wrap.u_clkgen.ac or
           dut.g_row[0].g_col[0].u_island.g_wrap[1].u_wrap.u_clkgen.ac)
    if (!rst) pauses++;
  always @(posedge lclk[0][1][W] or posedge lclk[1][1][N]) if (!rst) begin
    #0.01;
    checks++;
    group_samples++;
    if (lclk[0][1][W] !== lclk[0][1][S] || lclk[1][1][N] !== lclk[1][1][W]) begin
      failures++;
      $display("grouped clocks differ");
    end
  end

  initial begin
    #400000;
    failures++;
    $display("watchdog: sent %0d, stage1 %0d, stage2 %0d, received %0d", k0, k1, k2, k3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1;
    k0 = 0; k1 = 0; k2 = 0; k3 = 0; in_flight_max = 0;
    got1 = 0; have1 = 0; got2 = 0; have2 = 0; got3 = 0; y1 = '0; y2 = '0;
    pauses = 0; group_samples = 0; lat_sum = 0; t_first = 0; t_last = 0;
    rcfg = '0; b_en = '0; b_sel = '0; fo_m = '0; fi_m = '0; ar_m = '0; mg_m = '0; dcfg = '0;
    grp = '0;
    grp[0][1] = 4'b0100;  // island (0,1): S and W wrappers share a clock
    grp[1][1] = 4'b1000;  // island (1,1): W and N wrappers share a clock
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
      for (int w = 0; w < 4; w++) dly[r][c][w] = 8'(24 + 6 * (2 * r + c) + w);
      for (int u = 0; u < N_CDU; u++) csel[r][c][u] = 2'(u % 4);
    end
    for (int b = 0; b < 64; b++) begin
      rcfg[0][0][E][b] = '{used: 1'b1, dir_out: 1'b1, port: 3'd0};
      rcfg[0][1][W][b] = '{used: 1'b1, dir_out: 1'b0, port: 3'd0};
      rcfg[0][1][S][b] = '{used: 1'b1, dir_out: 1'b1, port: 3'd0};
      rcfg[1][1][N][b] = '{used: 1'b1, dir_out: 1'b0, port: 3'd0};
      rcfg[1][1][W][b] = '{used: 1'b1, dir_out: 1'b1, port: 3'd0};
      rcfg[1][0][E][b] = '{used: 1'b1, dir_out: 1'b0, port: 3'd0};
    end
    #50 rst = 0;
    wait (k3 == NB);
    #100;
    checks++;
    if (err != '0) begin failures++; $display("configuration error flagged"); end
    checks++;
    if (in_flight_max < 2) begin failures++; $display("stages never overlapped (max %0d in flight)", in_flight_max); end
    checks++;
    if (pauses == 0) begin failures++; $display("no clock pause"); end
    checks++;
    if (group_samples == 0) begin failures++; $display("grouped clocks never checked"); end
    $display("blocks %0d, max in flight %0d, pauses %0d", k3, in_flight_max, pauses);
    $display("throughput %0.2f ns per block, mean latency %0.2f ns",
             (t_last - t_first) / (NB - 1), lat_sum / NB);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
