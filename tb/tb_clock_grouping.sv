`timescale 1ns/1ps
// tb_clock_grouping: two free-running clocks of different periods (6 and
// 10 ns). Ungrouped, each output equals its own input. Grouped, both
// outputs equal the common clock of a reference C-element, rise only while
// both inputs are high, and one input held low (a paused wrapper) stops
// the common clock.
module tb_clock_grouping;
  logic rst, en, ca, cb, oa, ob, model, hold_a;
  int checks = 0, failures = 0, rises;

  clock_grouping dut (.rst(rst), .group_en(en), .clk_a(ca), .clk_b(cb), .clk_a_out(oa), .clk_b_out(ob));

  initial begin ca = 0; forever #3 ca = hold_a ? 1'b0 : ~ca; end
  initial begin cb = 0; forever #5 cb = ~cb; end

  always @(ca or cb or rst) begin
    if (rst) model = 0;
    else if (ca && cb) model = 1;
    else if (!ca && !cb) model = 0;
  end
  always @(posedge oa) rises++;

  initial begin
    #100000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; en = 0; hold_a = 0; rises = 0;
    #2.25 rst = 0;
    repeat (200) begin
      #0.5;
      checks++;
      if (oa !== ca || ob !== cb) begin failures++; $display("ungrouped outputs differ"); end
    end
    en = 1;
    repeat (200) begin
      #0.5;
      checks++;
      if (oa !== model || ob !== model) begin failures++; $display("grouped output %b %b model %b", oa, ob, model); end
    end
    // pause wrapper a: its clock stays low, the common clock stops
    @(negedge ca); hold_a = 1;
    #12 rises = 0;
    #60;
    checks++;
    if (rises != 0) begin failures++; $display("common clock ran while a was held"); end
    hold_a = 0;
    #60;
    checks++;
    if (rises == 0) begin failures++; $display("common clock did not resume"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
