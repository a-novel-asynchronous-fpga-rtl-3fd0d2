`timescale 1ns/1ps
// tb_hs_fanout: one 2-phase sender, four receivers with random acknowledge
// delays and random non-zero enable masks. Checks: every enabled output
// carries each request event and disabled outputs stay low; the sender's
// acknowledge event comes only after the last enabled receiver
// acknowledged, and exactly once per request.
module tb_hs_fanout;
  logic rst, req_in, ack_in;
  logic [3:0] mask, req_out, ack_out;
  int checks = 0, failures = 0;

  hs_fanout #(.N(4)) dut (.rst(rst), .mask(mask), .req_in(req_in), .ack_in(ack_in), .req_out(req_out), .ack_out(ack_out));

  for (genvar i = 0; i < 4; i++) begin : g_rx
    always @(req_out[i]) if (!rst && mask[i]) begin
      #($urandom_range(1, 20));
      ack_out[i] = req_out[i];
    end
  end

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
      rst = 1; req_in = 0; ack_out = 0; #1 rst = 0; #1;
      for (int k = 0; k < 10; k++) begin
        req_in = ~req_in;
        #0.5;
        checks++;
        if (req_out !== (mask & {4{req_in}})) begin failures++; $display("req_out %b mask %b", req_out, mask); end
        while ((ack_out & mask) != (mask & {4{req_in}})) begin
          checks++;
          if (ack_in === req_in) begin failures++; $display("early ack"); end
          #0.5;
        end
        #0.1;
        checks++;
        if (ack_in !== req_in) begin failures++; $display("missing ack"); end
        #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
