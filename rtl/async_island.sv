`timescale 1ns/1ps
// async_island: one asynchronous island of the array. It holds four
// asynchronous wrappers, one per side (0 north, 1 east, 2 south, 3 west),
// four clock grouping modules at the corners and the clock distribution of
// the synchronous logic block. Grouping module k sits between wrappers k
// and k+1 (mod 4); when enabled, both wrappers run on the common clock it
// makes. The four domain clocks are the island's local clocks 1..4, which
// run over the whole logic block; each of the 16 clock distribution units
// takes one of them. The synchronous logic block itself (an array of
// conventional FPGA logic) is not part of this RTL: its side of every
// wrapper (port enables, load strobes, data) and the clocks it receives
// are ports of the island. Configuration is static: ring delays, grouping
// bits (two adjacent grouping modules must not both be enabled, so that a
// wrapper belongs to at most one group; an assertion checks this), CDU
// clock selects and the register matrix of every wrapper.
// Lint and synthesis report latches and combinational loops here; they are
// the C-elements, ME elements and clock rings of the wrappers and grouping
// modules, which hold state without a clock by design.
module async_island
  import gapla_pkg::*;
#(
  parameter int unsigned NIN  = N_IN_PORTS,
  parameter int unsigned NOUT = N_OUT_PORTS,
  parameter int unsigned NREG = N_IO_REGS,
  parameter int unsigned NCDU = N_CDU
) (
  input  logic                             rst,
  input  logic [3:0][7:0]                  dly_cfg,
  input  logic [3:0]                       grp_en,
  input  logic [NCDU-1:0][1:0]             cdu_sel,
  input  io_reg_cfg_t [3:0][NREG-1:0]      reg_cfg,
  output logic [3:0]                       cfg_err,
  // synchronous logic block side
  output logic [3:0]                       local_clk,
  output logic [NCDU-1:0]                  cdu_clk,
  input  logic [3:0][NIN-1:0]              in_en,
  output logic [3:0][NIN-1:0]              in_load,
  input  logic [3:0][NOUT-1:0]             out_en,
  output logic [3:0][NOUT-1:0]             out_load,
  input  logic [3:0][NREG-1:0]             lb_dout,
  output logic [3:0][NREG-1:0]             lb_din,
  // interconnect side, per wrapper
  input  logic [3:0][NIN-1:0]              in_req,
  output logic [3:0][NIN-1:0]              in_ack,
  output logic [3:0][NOUT-1:0]             out_req,
  input  logic [3:0][NOUT-1:0]             out_ack,
  input  logic [3:0][NREG-1:0]             pin_in,
  output logic [3:0][NREG-1:0]             pin_out,
  output logic [3:0][NREG-1:0]             pin_oe
);

  logic [3:0] clk_gen;
  logic [3:0] grp_a, grp_b;  // grouping module k: a side = wrapper k, b side = wrapper k+1

  for (genvar k = 0; k < 4; k++) begin : g_grp
    clock_grouping u_grp (
      .rst       (rst),
      .group_en  (grp_en[k]),
      .clk_a     (clk_gen[k]),
      .clk_b     (clk_gen[(k + 1) % 4]),
      .clk_a_out (grp_a[k]),
      .clk_b_out (grp_b[k])
    );
  end

  for (genvar k = 0; k < 4; k++) begin : g_wrap
    assign local_clk[k] = grp_en[k] ? grp_a[k] : grp_b[(k + 3) % 4];

    async_wrapper #(.NIN(NIN), .NOUT(NOUT), .NREG(NREG)) u_wrap (
      .rst      (rst),
      .dly_cfg  (dly_cfg[k]),
      .clk_gen  (clk_gen[k]),
      .clk      (local_clk[k]),
      .reg_cfg  (reg_cfg[k]),
      .cfg_err  (cfg_err[k]),
      .in_en    (in_en[k]),
      .in_load  (in_load[k]),
      .out_en   (out_en[k]),
      .out_load (out_load[k]),
      .lb_dout  (lb_dout[k]),
      .lb_din   (lb_din[k]),
      .in_req   (in_req[k]),
      .in_ack   (in_ack[k]),
      .out_req  (out_req[k]),
      .out_ack  (out_ack[k]),
      .pin_in   (pin_in[k]),
      .pin_out  (pin_out[k]),
      .pin_oe   (pin_oe[k])
    );
  end

  cdu_clock_select #(.NCDU(NCDU), .NCLK(4)) u_cdu (
    .local_clk (local_clk),
    .sel       (cdu_sel),
    .cdu_clk   (cdu_clk)
  );

  always_comb
    assert (rst || (grp_en & {grp_en[0], grp_en[3:1]}) == 4'b0)
      else $error("async_island: adjacent clock grouping modules both enabled");

endmodule
