`timescale 1ns/1ps
// req_delay: behavioural model of the fixed delay element placed on every
// request wire of the routing structure. Delaying req by a predefined amount
// makes sure the bundled data wires, which run beside it, have settled at
// the receiver before the request event does. In silicon this is an analog
// delay line; here it is a transport delay of DELAY_NS per event.
// The 0.5 ns default is this model's choice: the amount is not specified.
module req_delay #(
  parameter real DELAY_NS = 0.5
) (
  input  logic req_in,
  output logic req_out
);

  initial req_out = 1'b0;

  always @(req_in) req_out <= #(DELAY_NS) req_in;

endmodule
