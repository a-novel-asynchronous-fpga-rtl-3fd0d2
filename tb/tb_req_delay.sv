`timescale 1ns/1ps
// tb_req_delay: request events spaced further apart than the delay must
// appear at the output exactly DELAY_NS later and not before.
module tb_req_delay;
  logic a, y;
  int checks = 0, failures = 0;
  realtime t_in;

  req_delay #(.DELAY_NS(0.5)) dut (.req_in(a), .req_out(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 0;
    #5;
    for (int k = 0; k < 50; k++) begin
      a = ~a;
      t_in = $realtime;
      #0.4;
      checks++;
      if (y === a) begin failures++; $display("event passed early"); end
      #0.2;
      checks++;
      if (y !== a) begin failures++; $display("event late or lost"); end
      #($urandom_range(1, 5));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
