`timescale 1ns/1ps
// tb_async_wrapper: two asynchronous wrappers with different local clock
// periods exchange a stream of words over one 2-phase channel. Wrapper A
// sends through output port 0, which owns data registers 0..11 (a 12-bit
// port); wrapper B receives on input port 0 owning the same 12 registers.
// The testbench plays both logic blocks: A raises out_en while it has
// words, B raises in_en while it expects words. Checks: every word arrives
// once and in order; A's clock is stretched to the slower receiver (its
// mean period during the transfer is above its free-running period); B
// pauses while no word is there; registers not owned by the port stay 0;
// an over-wide port configuration raises cfg_err.
module tb_async_wrapper;
  import gapla_pkg::*;

  localparam int NW = 40;
  localparam int W  = 12;

  logic rst;
  int   checks = 0, failures = 0;

  io_reg_cfg_t [N_IO_REGS-1:0] cfg_a, cfg_b;
  logic clk_a, clk_b, err_a, err_b;
  logic [7:0] in_en_a, in_load_a, out_en_a, out_load_a;
  logic [7:0] in_en_b, in_load_b, out_en_b, out_load_b;
  logic [7:0] in_req_a, in_ack_a, out_req_a, out_ack_a;
  logic [7:0] in_req_b, in_ack_b, out_req_b, out_ack_b;
  logic [N_IO_REGS-1:0] dout_a, din_a, pin_out_a, pin_oe_a;
  logic [N_IO_REGS-1:0] dout_b, din_b, pin_out_b, pin_oe_b;

  async_wrapper u_a (
    .rst(rst), .dly_cfg(8'd30), .clk_gen(clk_a), .clk(clk_a), .reg_cfg(cfg_a), .cfg_err(err_a),
    .in_en(in_en_a), .in_load(in_load_a), .out_en(out_en_a), .out_load(out_load_a),
    .lb_dout(dout_a), .lb_din(din_a),
    .in_req(in_req_a), .in_ack(in_ack_a), .out_req(out_req_a), .out_ack(out_ack_a),
    .pin_in(pin_out_b), .pin_out(pin_out_a), .pin_oe(pin_oe_a));

  async_wrapper u_b (
    .rst(rst), .dly_cfg(8'd55), .clk_gen(clk_b), .clk(clk_b), .reg_cfg(cfg_b), .cfg_err(err_b),
    .in_en(in_en_b), .in_load(in_load_b), .out_en(out_en_b), .out_load(out_load_b),
    .lb_dout(dout_b), .lb_din(din_b),
    .in_req(in_req_b), .in_ack(in_ack_b), .out_req(out_req_b), .out_ack(out_ack_b),
    .pin_in(pin_out_a), .pin_out(pin_out_b), .pin_oe(pin_oe_b));

  // channel A.out0 -> B.in0; other ports idle
  assign in_req_b  = {7'b0, out_req_a[0]};
  assign out_ack_a = {7'b0, in_ack_b[0]};
  assign in_req_a  = '0;
  assign out_ack_b = '0;
  assign in_en_a   = '0;
  assign out_en_b  = '0;
  assign dout_b    = '0;

  function automatic logic [W-1:0] word(int k);
    return W'((k * 2654435761) >> 7) ^ W'(k);
  endfunction

  int k_s, k_r, edges_a, edges_b_pause;
  logic got;
  realtime t_start, t_end;

  assign out_en_a = {7'b0, (k_s < NW) && !rst};
  assign in_en_b  = {7'b0, (k_r < NW) && !rst};
  always_comb begin
    dout_a = '0;
    dout_a[W-1:0] = word(k_s);
  end

  always @(posedge clk_a) if (!rst && out_en_a[0]) begin
    k_s <= k_s + 1;
    edges_a <= edges_a + 1;
  end

  always @(posedge clk_b) if (!rst) begin
    got <= in_en_b[0] && in_load_b[0];
    if (in_en_b[0] && in_load_b[0]) k_r <= k_r + 1;
  end

  always @(negedge clk_b) if (got) begin
    checks++;
    if (din_b[W-1:0] !== word(k_r - 1)) begin
      failures++;
      $display("word %0d: got %h expected %h", k_r - 1, din_b[W-1:0], word(k_r - 1));
    end
    checks++;
    if (din_b[N_IO_REGS-1:W] != '0) begin
      failures++;
      $display("unowned registers of B changed");
    end
  end

  // B is paused whenever its pause grant for input port 0 is held
  always @(posedge u_b.ac[0]) edges_b_pause++;

  initial begin
    #50000;
    failures++;
    $display("watchdog: k_s=%0d k_r=%0d", k_s, k_r);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < N_IO_REGS; r++) begin
      cfg_a[r] = '{used: r < W, dir_out: 1'b1, port: 3'd0};
      cfg_b[r] = '{used: r < W, dir_out: 1'b0, port: 3'd0};
    end
    k_s = 0; k_r = 0; edges_a = 0; edges_b_pause = 0; got = 0;
    rst = 1;
    #20 rst = 0;
    t_start = $realtime;
    wait (k_r == NW);
    t_end = $realtime;
    #30;
    checks++;
    if (k_s != NW || edges_a != NW) begin
      failures++;
      $display("sender edges %0d words %0d", edges_a, k_s);
    end
    // A free-runs at 2*3.0 ns; the 11 ns receiver must have stretched it
    checks++;
    if ((t_end - t_start) / NW < 8.0) begin
      failures++;
      $display("sender not stretched: %f ns per word", (t_end - t_start) / NW);
    end
    $display("ns per word %f, B pauses %0d", (t_end - t_start) / NW, edges_b_pause);
    checks++;
    if (err_a || err_b) begin failures++; $display("unexpected cfg_err"); end
    // a port owning 65 registers is an illegal configuration
    for (int r = 0; r < N_IO_REGS; r++) cfg_a[r] = '{used: r < 65, dir_out: 1'b1, port: 3'd2};
    #1;
    checks++;
    if (!err_a) begin failures++; $display("cfg_err not raised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
