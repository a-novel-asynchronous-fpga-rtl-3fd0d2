`timescale 1ns/1ps
// tb_in_port_ctrl: the input port controller with a testbench clock that,
// like the real generator, grants a pause request only while the clock is
// high and holds the next rising edge until the request drops. A testbench
// sender makes a request event after a random delay each time the previous
// one was acknowledged. Checks: a clock edge with en high happens only
// when a word has arrived and takes it (load high, ack follows req); every
// request event is acknowledged exactly once; with en low nothing is taken
// and the clock is never held.
module tb_in_port_ctrl;
  logic clk, rst, en, load, rc, ac, req, ack;
  int checks = 0, failures = 0;
  int sent, taken, pauses;

  in_port_ctrl dut (.clk(clk), .rst(rst), .en(en), .load(load), .rc(rc), .ac(ac), .req(req), .ack(ack));

  // pausable clock, period 10 ns: a pause request is granted while the
  // clock is high; a granted pause holds the next rising edge
  always @(rc or clk) begin
    if (!rc)     ac = 1'b0;
    else if (clk) ac = 1'b1;
  end
  always @(posedge ac) pauses++;

  initial begin
    clk = 0; ac = 0;
    forever begin
      #5;
      wait (!ac);
      clk = 1;
      #5 clk = 0;
    end
  end

  // sender
  initial begin
    req = 0; sent = 0;
    wait (!rst);
    forever begin
      #($urandom_range(2, 40));
      if (sent < 150) begin
        req = ~req;
        sent++;
        wait (ack == req);
      end
    end
  end

  always @(posedge clk) if (!rst) begin
    if (en) begin
      checks++;
      if (!(load && req != ack)) begin failures++; $display("edge with en but no word"); end
      taken++;
    end else begin
      checks++;
      if (load) begin failures++; $display("load without en"); end
    end
  end

  initial begin
    #300000;
    failures++;
    $display("watchdog taken=%0d sent=%0d req=%b ack=%b rc=%b ac=%b en=%b", taken, sent, req, ack, rc, ac, en);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; en = 0; taken = 0; pauses = 0;
    #22 rst = 0;
    // logic block idle for a while: nothing is taken, clock runs freely
    #200;
    checks++;
    if (taken != 0 || pauses != 0 || ack !== 1'b0) begin failures++; $display("idle port took data"); end
    @(posedge clk); #2 en = 1;
    wait (taken == 150);
    #2 en = 0;
    // with en low the clock must run freely again
    pauses = 0;
    #100;
    checks++;
    if (pauses != 0 || rc) begin failures++; $display("clock held with en low"); end
    pauses = 1;
    #100;
    checks++;
    if (ack !== req) begin failures++; $display("last word not acknowledged"); end
    checks++;
    if (pauses == 0) begin failures++; $display("the clock was never held"); end
    $display("taken %0d pauses %0d", taken, pauses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
