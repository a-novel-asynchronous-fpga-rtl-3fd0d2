`timescale 1ns/1ps
// tb_mutex: random request sequences into the ME element. Checks that the
// two grants are never high together, that a grant only goes to a present
// request, that a held grant is kept while its request stays, and that a
// lone request is always granted.
module tb_mutex;
  logic       rst;
  logic [1:0] r, g, g_prev;
  int checks = 0, failures = 0;

  mutex dut (.rst(rst), .r(r), .g(g));

  initial begin
    #100000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; r = 2'b11; #1;
    checks++; if (g !== 2'b00) begin failures++; $display("reset"); end
    r = 2'b00; #1 rst = 0; #1;
    g_prev = g;
    for (int k = 0; k < 500; k++) begin
      r = 2'($urandom_range(0, 3));
      #1;
      checks++;
      if (g == 2'b11) begin failures++; $display("both granted"); end
      checks++;
      if ((g & ~r) != 2'b00) begin failures++; $display("grant without request"); end
      checks++;
      if ((g_prev & r) != (g_prev & r & g)) begin failures++; $display("held grant lost r=%b g=%b prev=%b", r, g, g_prev); end
      checks++;
      if ((r == 2'b01 && g != 2'b01) || (r == 2'b10 && g != 2'b10)) begin failures++; $display("lone request r=%b g=%b", r, g); end
      g_prev = g;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
