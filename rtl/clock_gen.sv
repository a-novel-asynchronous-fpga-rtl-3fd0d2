`timescale 1ns/1ps
// clock_gen: behavioural model of the pausable local clock generator of an
// asynchronous wrapper (a ring oscillator with programmable period).
// Structure: clk is the output of a C-element whose inputs are clkallowed
// and the delayed, inverted clock. eclk, the inverted clock, requests one
// ME element per port alongside that port's pause request rc[i]; the
// ME outputs on the clock side are ANDed into clkallowed, and the port
// side drives ac[i]. While eclk is high and every ME has granted it, the
// clock rises after the ring delay; while any rc[i] holds its ME (ac[i]
// high), clkallowed stays low and the next rising edge waits. Several
// ports may hold the clock at once.
// The ring delay is analog in silicon; here it is a simulation delay of
// max(dly_cfg,1) * UNIT_NS per half period, so the free-running period is
// 2 * dly_cfg * UNIT_NS. The 8-bit delay setting and the 0.1 ns unit are
// this model's choice; the architecture specifies only a programmable period.
// rst (active high) holds clk low.
// The ring (C-element output fed back through the delay and the ME
// elements) is a deliberate combinational loop, and the C-element is a
// latch: tools report both, and both are how an oscillator works.
module clock_gen #(
  parameter int unsigned NPORTS  = 16,
  parameter real         UNIT_NS = 0.1
) (
  input  logic              rst,
  input  logic [7:0]        dly_cfg,
  input  logic [NPORTS-1:0] rc,
  output logic [NPORTS-1:0] ac,
  output logic              clk
);

  logic              eclk;
  logic              ring_fb;
  logic [NPORTS-1:0] clk_side;
  logic              clkallowed;

  assign eclk = ~clk;

  for (genvar i = 0; i < NPORTS; i++) begin : g_me
    mutex u_me (
      .rst (rst),
      .r   ({eclk, rc[i]}),
      .g   ({clk_side[i], ac[i]})
    );
  end

  assign clkallowed = &clk_side;

  // Programmable delay line of the ring.
  initial ring_fb = 1'b0;

  always begin
    @(eclk or rst);
    if (!rst) begin
      #(UNIT_NS);
      for (int unsigned n = 1; n < 32'(dly_cfg); n++) #(UNIT_NS);
    end
    ring_fb = eclk && !rst;
  end

  c_element #(.N(2)) u_c (
    .rst (rst),
    .in  ({ring_fb, clkallowed}),
    .out (clk)
  );

endmodule
