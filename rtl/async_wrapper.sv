`timescale 1ns/1ps
// async_wrapper: one asynchronous wrapper of an island. It holds a pausable
// local clock generator, 8 input and 8 output 2-phase port controllers and
// the 128 I/O data registers with their enable distribution matrix.
// The generator's clock leaves on clk_gen; the port controllers and data
// registers run on clk, the clock of this wrapper's clock domain, which is
// clk_gen itself or, when a clock grouping module joins this wrapper with a
// neighbour, the common clock of both. Every port controller has its own
// pause request into the generator (input ports 0..7 use generator ports
// 0..7, output ports use 8..15), so any number of ports may hold the clock.
// Logic-block side: in_en/out_en are the port enables, in_load/out_load
// show the clock edges at which a port took or sent a word, lb_dout/lb_din
// are the data registers' logic-facing values. Wire side: a 2-phase
// req/ack pair per port and the registers' pin values. The port counts,
// register count and structure are the architecture's; the numbering of
// the generator's pause ports is this design's.
// Latches and combinational loops reported inside are those of the clock
// generator's ring, ME elements and the port controllers' C-elements; they
// are the asynchronous circuit itself, not inferred by mistake.
module async_wrapper
  import gapla_pkg::*;
#(
  parameter int unsigned NIN  = N_IN_PORTS,
  parameter int unsigned NOUT = N_OUT_PORTS,
  parameter int unsigned NREG = N_IO_REGS
) (
  input  logic                   rst,
  input  logic [7:0]             dly_cfg,   // ring delay setting of the generator
  output logic                   clk_gen,   // this wrapper's generated clock
  input  logic                   clk,       // clock of this wrapper's domain
  input  io_reg_cfg_t [NREG-1:0] reg_cfg,
  output logic                   cfg_err,
  // logic block side
  input  logic [NIN-1:0]         in_en,
  output logic [NIN-1:0]         in_load,
  input  logic [NOUT-1:0]        out_en,
  output logic [NOUT-1:0]        out_load,
  input  logic [NREG-1:0]        lb_dout,
  output logic [NREG-1:0]        lb_din,
  // interconnect side
  input  logic [NIN-1:0]         in_req,
  output logic [NIN-1:0]         in_ack,
  output logic [NOUT-1:0]        out_req,
  input  logic [NOUT-1:0]        out_ack,
  input  logic [NREG-1:0]        pin_in,
  output logic [NREG-1:0]        pin_out,
  output logic [NREG-1:0]        pin_oe
);

  logic [NIN+NOUT-1:0] rc;
  logic [NIN+NOUT-1:0] ac;

  clock_gen #(.NPORTS(NIN + NOUT)) u_clkgen (
    .rst     (rst),
    .dly_cfg (dly_cfg),
    .rc      (rc),
    .ac      (ac),
    .clk     (clk_gen)
  );

  for (genvar i = 0; i < NIN; i++) begin : g_in
    in_port_ctrl u_in (
      .clk  (clk),
      .rst  (rst),
      .en   (in_en[i]),
      .load (in_load[i]),
      .rc   (rc[i]),
      .ac   (ac[i]),
      .req  (in_req[i]),
      .ack  (in_ack[i])
    );
  end

  for (genvar i = 0; i < NOUT; i++) begin : g_out
    out_port_ctrl u_out (
      .clk  (clk),
      .rst  (rst),
      .en   (out_en[i]),
      .load (out_load[i]),
      .rc   (rc[NIN+i]),
      .ac   (ac[NIN+i]),
      .req  (out_req[i]),
      .ack  (out_ack[i])
    );
  end

  io_port_matrix #(.NREG(NREG), .NIN(NIN), .NOUT(NOUT)) u_regs (
    .clk      (clk),
    .rst      (rst),
    .cfg      (reg_cfg),
    .in_load  (in_load),
    .out_load (out_load),
    .lb_dout  (lb_dout),
    .lb_din   (lb_din),
    .pin_in   (pin_in),
    .pin_out  (pin_out),
    .pin_oe   (pin_oe),
    .cfg_err  (cfg_err)
  );

endmodule
