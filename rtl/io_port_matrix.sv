`timescale 1ns/1ps
// io_port_matrix: the bidirectional I/O data registers of one asynchronous
// wrapper and the matrix that distributes the port controllers' register
// enables to them, which makes the data width of every port programmable.
// Each of the NREG registers has a configuration entry (io_reg_cfg_t):
// unused, or attached to input port p, or attached to output port p. An
// output register captures lb_dout from the logic block at a clock edge
// where its port's load is high and drives its value on pin_out with
// pin_oe high. An input register captures pin_in from the wires at a clock
// edge where its port's load is high and presents it on lb_din. A port owns
// as many registers as point at it, up to MAX_BITS; cfg_err flags a
// configuration that gives any port more.
// The register count, port counts and the 64-bit limit are the
// architecture's; the encoding of the matrix as one selector per register
// and the error flag are this design's. Registers are reset to zero.
module io_port_matrix
  import gapla_pkg::*;
#(
  parameter int unsigned NREG     = N_IO_REGS,
  parameter int unsigned NIN      = N_IN_PORTS,
  parameter int unsigned NOUT     = N_OUT_PORTS,
  parameter int unsigned MAX_BITS = MAX_PORT_BITS
) (
  input  logic                 clk,
  input  logic                 rst,
  input  io_reg_cfg_t [NREG-1:0] cfg,
  input  logic [NIN-1:0]       in_load,
  input  logic [NOUT-1:0]      out_load,
  input  logic [NREG-1:0]      lb_dout,   // from the logic block (output registers)
  output logic [NREG-1:0]      lb_din,    // to the logic block (input registers)
  input  logic [NREG-1:0]      pin_in,    // from the interconnect wires
  output logic [NREG-1:0]      pin_out,   // to the interconnect wires
  output logic [NREG-1:0]      pin_oe,    // this register drives its wire
  output logic                 cfg_err    // a port owns more than MAX_BITS registers
);

  localparam int unsigned CW = $clog2(NREG + 1);

  logic [NREG-1:0] q;
  logic [NREG-1:0] reg_en;

  // Enable distribution matrix: one crosspoint per register and port.
  always_comb begin
    for (int r = 0; r < NREG; r++) begin
      if (!cfg[r].used)
        reg_en[r] = 1'b0;
      else if (cfg[r].dir_out)
        reg_en[r] = (32'(cfg[r].port) < NOUT) && out_load[cfg[r].port];
      else
        reg_en[r] = (32'(cfg[r].port) < NIN) && in_load[cfg[r].port];
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      q <= '0;
    end else begin
      for (int r = 0; r < NREG; r++)
        if (reg_en[r]) q[r] <= cfg[r].dir_out ? lb_dout[r] : pin_in[r];
    end
  end

  always_comb begin
    for (int r = 0; r < NREG; r++) begin
      pin_oe[r]  = cfg[r].used && cfg[r].dir_out;
      pin_out[r] = pin_oe[r] && q[r];
      lb_din[r]  = cfg[r].used && !cfg[r].dir_out && q[r];
    end
  end

  // Width limit check: count the registers owned by every port.
  always_comb begin
    logic [CW-1:0] cnt_in  [NIN];
    logic [CW-1:0] cnt_out [NOUT];
    for (int p = 0; p < NIN; p++)  cnt_in[p]  = '0;
    for (int p = 0; p < NOUT; p++) cnt_out[p] = '0;
    for (int r = 0; r < NREG; r++) begin
      for (int p = 0; p < NIN; p++)
        if (cfg[r].used && !cfg[r].dir_out && 32'(cfg[r].port) == p) cnt_in[p] = cnt_in[p] + 1'b1;
      for (int p = 0; p < NOUT; p++)
        if (cfg[r].used && cfg[r].dir_out && 32'(cfg[r].port) == p) cnt_out[p] = cnt_out[p] + 1'b1;
    end
    cfg_err = 1'b0;
    for (int p = 0; p < NIN; p++)  if (32'(cnt_in[p])  > MAX_BITS) cfg_err = 1'b1;
    for (int p = 0; p < NOUT; p++) if (32'(cnt_out[p]) > MAX_BITS) cfg_err = 1'b1;
  end

endmodule
