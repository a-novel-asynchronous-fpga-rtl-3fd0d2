`timescale 1ns/1ps
// tb_async_island: one island with different ring delays per wrapper,
// wrappers 0 and 1 grouped into one clock domain, random CDU clock
// selects. The testbench loops output port 0 of wrapper 0 (16 bits) back
// to input port 0 of wrapper 2 and plays the logic block on both ends.
// Checks: 30 words cross between the two clock domains intact and in
// order; the grouped wrappers run on one clock; every CDU gets the clock
// it selects; a pause held by an input port of wrapper 1 stops the clock
// of the whole group (wrapper 0 included) while wrapper 3 runs on, and the
// group resumes when the word arrives.
module tb_async_island;
  import gapla_pkg::*;
  localparam int NW = 30, W = 16;

  logic rst;
  logic [3:0][7:0] dly;
  logic [3:0] grp, err, lclk;
  logic [15:0][1:0] csel;
  logic [15:0] cclk;
  io_reg_cfg_t [3:0][N_IO_REGS-1:0] rcfg;
  logic [3:0][7:0] in_en, in_load, out_en, out_load, in_req, in_ack, out_req, out_ack;
  logic [3:0][N_IO_REGS-1:0] dout, din, pin_in, pin_out, pin_oe;
  int checks = 0, failures = 0;

  async_island dut (.rst(rst), .dly_cfg(dly), .grp_en(grp), .cdu_sel(csel), .reg_cfg(rcfg), .cfg_err(err),
    .local_clk(lclk), .cdu_clk(cclk), .in_en(in_en), .in_load(in_load), .out_en(out_en), .out_load(out_load),
    .lb_dout(dout), .lb_din(din), .in_req(in_req), .in_ack(in_ack), .out_req(out_req), .out_ack(out_ack),
    .pin_in(pin_in), .pin_out(pin_out), .pin_oe(pin_oe));

  // loop wrapper 0 output port 0 to wrapper 2 input port 0
  logic ext_req;  // testbench sender on wrapper 1 input port 3
  always_comb begin
    in_req = '0; out_ack = '0; pin_in = '0;
    in_req[2][0]  = out_req[0][0];
    out_ack[0][0] = in_ack[2][0];
    pin_in[2]     = pin_out[0] & pin_oe[0];
    in_req[1][3]  = ext_req;
  end

  function automatic logic [W-1:0] word(int k);
    return W'(k * 40503 + 7);
  endfunction

  int k_s, k_r, e0, e3;
  logic got, sending, receiving;
  always_comb begin
    out_en = '0; in_en = '0; dout = '0;
    out_en[0][0] = sending && k_s < NW;
    in_en[2][0]  = receiving && k_r < NW;
    dout[0][W-1:0] = word(k_s);
    in_en[1][3]  = (ext_req == in_ack[1][3]) && !sending && k_r == NW;
  end
  always @(posedge lclk[0]) begin
    e0++;
    if (out_en[0][0]) k_s <= k_s + 1;
  end
  always @(posedge lclk[3]) e3++;
  always @(posedge lclk[2]) begin
    got <= in_en[2][0] && in_load[2][0];
    if (in_en[2][0] && in_load[2][0]) k_r <= k_r + 1;
  end
  always @(negedge lclk[2]) if (got) begin
    checks++;
    if (din[2][W-1:0] !== word(k_r - 1)) begin failures++; $display("word %0d: %h", k_r - 1, din[2][W-1:0]); end
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog k_s=%0d k_r=%0d", k_s, k_r);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; dly = {8'd60, 8'd50, 8'd40, 8'd30}; grp = 4'b0001; ext_req = 0;
    k_s = 0; k_r = 0; got = 0; sending = 0; receiving = 0; e0 = 0; e3 = 0;
    for (int u = 0; u < 16; u++) csel[u] = 2'($urandom);
    for (int w = 0; w < 4; w++) for (int r = 0; r < N_IO_REGS; r++) rcfg[w][r] = '0;
    for (int r = 0; r < W; r++) begin
      rcfg[0][r] = '{used: 1'b1, dir_out: 1'b1, port: 3'd0};
      rcfg[2][r] = '{used: 1'b1, dir_out: 1'b0, port: 3'd0};
    end
    #20 rst = 0;
    #2 sending = 1; receiving = 1;
    // sample clocks while the transfer runs
    repeat (300) begin
      #0.37;
      checks++;
      if (lclk[0] !== lclk[1]) begin failures++; $display("grouped clocks differ"); end
      checks++;
      for (int u = 0; u < 16; u++) if (cclk[u] !== lclk[csel[u]]) begin failures++; $display("cdu %0d", u); break; end
    end
    wait (k_r == NW);
    sending = 0;
    // wrapper 1 input port 3 now waits for a word: the group must stop
    #30 e0 = 0; e3 = 0;
    #100;
    checks++;
    if (e0 != 0) begin failures++; $display("group clock ran during the pause: %0d edges", e0); end
    checks++;
    if (e3 == 0) begin failures++; $display("ungrouped wrapper 3 stopped too"); end
    ext_req = 1;
    #50;
    checks++;
    if (e0 == 0) begin failures++; $display("group clock did not resume"); end
    checks++;
    if (err != 4'b0) begin failures++; $display("cfg_err"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
