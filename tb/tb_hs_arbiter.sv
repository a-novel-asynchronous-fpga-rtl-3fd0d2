`timescale 1ns/1ps
// tb_hs_arbiter: four independent 2-phase senders make 40 transfers each
// at random times, competing for one receiver that acknowledges after a
// random delay. Checks: a new output request event never comes while the
// previous one is unacknowledged; every acknowledge to a sender follows a
// receiver acknowledge; every transfer of every sender completes; the
// total number of output events equals the number of transfers; and
// simultaneous requests did occur (the arbitration was exercised).
module tb_hs_arbiter;
  localparam int NT = 40;
  logic rst, req_out, ack_out;
  logic [3:0] mask, req_in, ack_in;
  int checks = 0, failures = 0;
  int done [4];
  int out_events, contended;
  logic out_busy;

  hs_arbiter dut (.rst(rst), .mask(mask), .req_in(req_in), .ack_in(ack_in), .req_out(req_out), .ack_out(ack_out));

  for (genvar i = 0; i < 4; i++) begin : g_tx
    initial begin
      done[i] = 0;
      wait (!rst);
      repeat (NT) begin
        #($urandom_range(0, 12));
        req_in[i] = ~req_in[i];
        wait (ack_in[i] == req_in[i]);
        done[i]++;
      end
    end
  end

  always @(req_out) if (!rst) begin
    checks++;
    if (out_busy) begin failures++; $display("output event while busy"); end
    out_busy = 1;
    out_events++;
    if ($countones(req_in ^ ack_in) > 1) contended++;
    #($urandom_range(1, 6));
    out_busy = 0;
    ack_out = req_out;
  end

  for (genvar i = 0; i < 4; i++) begin : g_ack
    always @(ack_in[i]) if (!rst) begin
      checks++;
      if (out_busy) begin failures++; $display("sender %0d acknowledged early", i); end
    end
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog %0d %0d %0d %0d", done[0], done[1], done[2], done[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; req_in = 0; ack_out = 0; mask = 4'b1111; out_events = 0; contended = 0; out_busy = 0;
    #5 rst = 0;
    wait (done[0] == NT && done[1] == NT && done[2] == NT && done[3] == NT);
    #20;
    checks++;
    if (out_events != 4 * NT) begin failures++; $display("output events %0d", out_events); end
    checks++;
    if (contended == 0) begin failures++; $display("no contention happened"); end
    $display("contended %0d", contended);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
