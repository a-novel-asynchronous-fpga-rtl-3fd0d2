`timescale 1ns/1ps
// out_port_ctrl: 2-phase output port controller of an asynchronous wrapper.
// The logic block raises en to send one word at the next local clock edge.
// At that edge req toggles (a 2-phase event: either Req+ or Req-) and load
// is high, so the data registers attached to this port capture the word in
// the same edge. While req differs from ack the transfer is pending, and
// the pause request rc is raised; once the clock generator grants it (ac)
// the next rising clock edge is held back. When the receiver toggles ack,
// rc falls only after ac was seen high, the generator lets the clock go,
// and if en is still high the next edge sends the next word with the
// opposite req transition.
// Gates follow the drawn controller: an XOR of en with the C-element of
// req and ack feeds the req flip-flop, an XOR of req and ack marks the
// pending transfer, and a C-element of that with the inverted ac makes rc.
// The asynchronous reset and the active-high polarity are this design's
// choice. The two C-elements hold state through latches by nature.
module out_port_ctrl (
  input  logic clk,
  input  logic rst,
  input  logic en,    // logic block: send a word at the next clock edge
  output logic load,  // enable of the attached data registers
  output logic rc,    // pause request to the clock generator
  input  logic ac,    // pause grant from the clock generator
  output logic req,   // 2-phase request to the receiver
  input  logic ack    // 2-phase acknowledge from the receiver
);

  logic req_ack_c;  // C-element of req and ack: the last completed phase
  logic pending;    // a sent word is not yet acknowledged

  c_element #(.N(2)) u_c_ra (
    .rst (rst),
    .in  ({ack, req}),
    .out (req_ack_c)
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst) req <= 1'b0;
    else     req <= en ^ req_ack_c;
  end

  assign load    = en;
  assign pending = req ^ ack;

  c_element #(.N(2)) u_c_rc (
    .rst (rst),
    .in  ({~ac, pending}),
    .out (rc)
  );

endmodule
