`timescale 1ns/1ps
// tb_hs_fanin: four 2-phase senders with random delays into one receiver,
// random non-zero enable masks. Checks: the output request event is made
// only once every enabled sender has made its event, never before; the
// receiver's acknowledge reaches every enabled sender and no disabled one.
module tb_hs_fanin;
  logic rst, req_out, ack_out;
  logic [3:0] mask, req_in, ack_in;
  int checks = 0, failures = 0;
  logic phase;

  hs_fanin #(.N(4)) dut (.rst(rst), .mask(mask), .req_in(req_in), .ack_in(ack_in), .req_out(req_out), .ack_out(ack_out));

  initial begin
    #1000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; req_in = 0; ack_out = 0; mask = 4'b1111;
    #5 rst = 0;
    for (int round = 0; round < 20; round++) begin
      do mask = 4'($urandom); while (mask == 0);
      rst = 1; req_in = 0; ack_out = 0; phase = 0; #1 rst = 0; #1;
      for (int k = 0; k < 10; k++) begin
        phase = ~phase;
        // senders make their events one by one in random order
        for (int n = 0; n < 4; n++) begin
          int i;
          do i = $urandom_range(0, 3); while (!mask[i] || req_in[i] == phase);
          checks++;
          if (req_out === phase) begin failures++; $display("output before all senders"); end
          req_in[i] = phase;
          #($urandom_range(1, 4));
          if ((req_in & mask) == (mask & {4{phase}})) break;
        end
        checks++;
        if (req_out !== phase) begin failures++; $display("output event missing"); end
        #2 ack_out = phase;
        #0.5;
        checks++;
        if (ack_in !== (mask & {4{phase}})) begin failures++; $display("ack_in %b mask %b", ack_in, mask); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
