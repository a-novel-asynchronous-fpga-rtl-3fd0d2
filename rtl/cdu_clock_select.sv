`timescale 1ns/1ps
// cdu_clock_select: clock distribution of one synchronous logic block. All
// NCLK local clocks of the island run over the whole block; each of the
// NCDU clock distribution units takes the one its 2-bit select names, so
// the size and shape of every clock domain is set by configuration. The
// selects are static configuration (changed only with the clocks stopped);
// 16 units and 4 clocks are the architecture's numbers.
// Combinational: cdu_clk[u] = local_clk[sel[u]].
module cdu_clock_select
  import gapla_pkg::*;
#(
  parameter int unsigned NCDU = N_CDU,
  parameter int unsigned NCLK = N_WRAPPERS
) (
  input  logic [NCLK-1:0]                    local_clk,
  input  logic [NCDU-1:0][$clog2(NCLK)-1:0]  sel,
  output logic [NCDU-1:0]                    cdu_clk
);

  always_comb begin
    for (int u = 0; u < NCDU; u++)
      cdu_clk[u] = local_clk[sel[u]];
  end

endmodule
