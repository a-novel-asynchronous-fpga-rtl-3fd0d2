`timescale 1ns/1ps
// clock_grouping: joins the clocks of two neighbouring asynchronous
// wrappers into one clock domain. A C-element of the two generated clocks
// gives a common clock that rises only when both generators have risen and
// falls only when both have fallen, so a pause held by any port controller
// of either wrapper stops the common clock: the domain has the ports of
// both wrappers. With group_en low each wrapper keeps its own clock.
// group_en is a static configuration bit (this design's choice of control).
// No clock of its own; outputs follow the inputs through the C-element and
// a multiplexer. rst (active high) clears the C-element.
// The C-element is written as a latch (it holds its output while the two
// clocks disagree); the latch reported by synthesis is that state.
module clock_grouping (
  input  logic rst,
  input  logic group_en,
  input  logic clk_a,      // generated clock of wrapper a
  input  logic clk_b,      // generated clock of wrapper b
  output logic clk_a_out,  // domain clock for wrapper a
  output logic clk_b_out   // domain clock for wrapper b
);

  logic clk_common;

  c_element #(.N(2)) u_c (
    .rst (rst),
    .in  ({clk_b, clk_a}),
    .out (clk_common)
  );

  always_comb begin
    clk_a_out = group_en ? clk_common : clk_a;
    clk_b_out = group_en ? clk_common : clk_b;
  end

endmodule
