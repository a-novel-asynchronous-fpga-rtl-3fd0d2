`timescale 1ns/1ps
// in_port_ctrl: 2-phase input port controller of an asynchronous wrapper.
// The logic block raises en when it needs a new word. If no new word has
// arrived (req equals ack), rc is raised and, once the clock generator
// grants it (ac), the next rising clock edge is held back. A transition on
// req means the bundled data is valid: rc falls, the generator lets the
// clock rise, and at that edge load is high so the attached data registers
// capture the word, and ack takes the value of req (one 2-phase event) to
// tell the sender the word was taken. If a word is already waiting when en
// rises, no pause happens and it is taken at the next edge.
// The gates follow the drawn controller in kind (an XOR of req and ack, an
// AND making rc from en, an AND enabling the data register, a C-element
// with the inverted ac, an enabled ack flip-flop); how they are joined is
// this design's reading of the function described for the controller. The
// asynchronous reset is this design's choice.
// The RC C-element is a latch by design; it is the one latch synthesis
// reports here.
module in_port_ctrl (
  input  logic clk,
  input  logic rst,
  input  logic en,    // logic block: a new word is needed
  output logic load,  // enable of the attached data registers
  output logic rc,    // pause request to the clock generator
  input  logic ac,    // pause grant from the clock generator
  input  logic req,   // 2-phase request from the sender
  output logic ack    // 2-phase acknowledge to the sender
);

  logic arrived;  // req has changed since the last word was taken
  logic want;     // the logic block waits for a word that is not here

  assign arrived = req ^ ack;
  assign want    = en & ~arrived;
  assign load    = en & arrived;

  c_element #(.N(2)) u_c_rc (
    .rst (rst),
    .in  ({~ac, want}),
    .out (rc)
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst)       ack <= 1'b0;
    else if (load) ack <= req;
  end

endmodule
