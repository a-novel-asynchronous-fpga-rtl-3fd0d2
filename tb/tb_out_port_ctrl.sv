`timescale 1ns/1ps
// tb_out_port_ctrl: the output port controller with a clock generated by
// the testbench that, like the real generator, grants a pause request (ac)
// only while the clock is high and then holds the next rising edge until
// the request drops. A testbench receiver acknowledges each request event
// after a random delay. Checks: req makes one transition per clock edge
// with en high and none while en is low; no edge happens while a transfer
// is pending; rc is raised for every transfer and dropped after the ack;
// load follows en.
module tb_out_port_ctrl;
  logic clk, rst, en, load, rc, ac, req, ack;
  int checks = 0, failures = 0;
  int sent, acked, edges_en, pauses;
  logic req_seen;

  out_port_ctrl dut (.clk(clk), .rst(rst), .en(en), .load(load), .rc(rc), .ac(ac), .req(req), .ack(ack));

  // pausable clock: period 10 ns, next rising edge waits while ac is held
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

  // receiver: acknowledge each request event after 3..30 ns
  always @(req) if (!rst) begin
    #($urandom_range(3, 30));
    ack = req;
    acked++;
  end

  always @(posedge clk) if (!rst) begin
    checks++;
    if (req !== ack) begin failures++; $display("clock edge while transfer pending"); end
    if (en) edges_en++;
    req_seen <= req;
  end

  always @(negedge clk) if (!rst) begin
    checks++;
    if (load !== en) begin failures++; $display("load differs from en"); end
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int req_events;
  always @(req) if (!rst) req_events++;

  initial begin
    rst = 1; en = 0; ack = 0; sent = 0; acked = 0; edges_en = 0; pauses = 0; req_events = 0;
    #22 rst = 0;
    for (int k = 0; k < 300; k++) begin
      @(posedge clk);
      #2 en = ($urandom_range(0, 2) != 0);
    end
    @(posedge clk); #2 en = 0;
    #100;
    checks++;
    if (req_events != edges_en) begin failures++; $display("req events %0d, edges with en %0d", req_events, edges_en); end
    checks++;
    if (acked != req_events) begin failures++; $display("acks %0d req events %0d", acked, req_events); end
    checks++;
    if (pauses < edges_en) begin failures++; $display("pauses %0d < transfers %0d", pauses, edges_en); end
    checks++;
    if (rc !== 1'b0) begin failures++; $display("rc left high"); end
    $display("transfers %0d pauses %0d", req_events, pauses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
