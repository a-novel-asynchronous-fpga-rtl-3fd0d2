`timescale 1ns/1ps
// mutex: behavioural model of a two-way mutual exclusion (ME) element.
// A silicon ME element is a cross-coupled latch followed by an analog
// metastability filter, so it is modelled here rather than synthesised.
// Each request r[i] is granted (g[i] high) only while the other grant is
// low; a grant is held until its request drops, and a waiting request is
// then granted. When both requests rise in the same instant, r[0] wins
// (a real element picks either side after a metastable interval).
// rst (active high) clears both grants. No clock; zero delay.
// Tools report a combinational loop through g (its new value depends on
// its old one): that feedback is the cross-coupled latch of the element.
module mutex (
  input  logic       rst,
  input  logic [1:0] r,
  output logic [1:0] g
);

  always @(rst or r) begin
    if (rst) begin
      g = 2'b00;
    end else begin
      g = g & r;
      if (g == 2'b00) begin
        if (r[0])      g = 2'b01;
        else if (r[1]) g = 2'b10;
      end
    end
  end

endmodule
