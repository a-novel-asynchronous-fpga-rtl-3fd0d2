`timescale 1ns/1ps
// tb_hs_merge: four 2-phase senders that take turns (one transfer at a
// time, random sender among the enabled ones) into one receiver. Checks:
// each request event appears once on the output; the acknowledge comes
// back only after the receiver's, only to the sender that requested; other
// senders' acknowledges do not move.
module tb_hs_merge;
  logic rst, req_out, ack_out;
  logic [3:0] mask, req_in, ack_in, ack_before;
  int checks = 0, failures = 0;

  hs_merge #(.N(4)) dut (.rst(rst), .mask(mask), .req_in(req_in), .ack_in(ack_in), .req_out(req_out), .ack_out(ack_out));

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
    for (int round = 0; round < 10; round++) begin
      do mask = 4'($urandom); while (mask == 0);
      rst = 1; req_in = 0; ack_out = 0; #1 rst = 0; #1;
      for (int k = 0; k < 30; k++) begin
        int i;
        logic prev;
        do i = $urandom_range(0, 3); while (!mask[i]);
        prev = req_out;
        ack_before = ack_in;
        req_in[i] = ~req_in[i];
        #0.5;
        checks++;
        if (req_out === prev) begin failures++; $display("event not merged"); end
        checks++;
        if (ack_in !== ack_before) begin failures++; $display("ack before the receiver's"); end
        #($urandom_range(1, 5)) ack_out = req_out;
        #0.5;
        checks++;
        if (ack_in !== (ack_before ^ (4'b1 << i))) begin failures++; $display("ack_in %b before %b sender %0d", ack_in, ack_before, i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
