`timescale 1ns/1ps
// c_element: N-input Muller C-element with reset.
// The output goes high once every input is high, goes low once every input
// is low, and otherwise keeps its value. It is the state-holding join of
// asynchronous handshakes and appears in the pausable clock generator, both
// port controllers and the clock grouping module. The hold is written as a
// level-sensitive latch (the gate's own keeper), so synthesis reports a
// latch here on purpose. rst (active high) forces the output low.
// Timing: no clock; the output follows its inputs after the gate delay.
module c_element #(
  parameter int unsigned N = 2
) (
  input  logic         rst,
  input  logic [N-1:0] in,
  output logic         out
);

  always_latch begin
    if (rst)
      out = 1'b0;
    else if (&in)
      out = 1'b1;
    else if (~|in)
      out = 1'b0;
  end

endmodule
