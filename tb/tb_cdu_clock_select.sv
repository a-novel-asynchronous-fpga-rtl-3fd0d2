`timescale 1ns/1ps
// tb_cdu_clock_select: random local clock values and random selects; every
// unit's clock must equal the local clock its select names.
module tb_cdu_clock_select;
  logic [3:0] lclk;
  logic [15:0][1:0] sel;
  logic [15:0] cdu;
  int checks = 0, failures = 0;

  cdu_clock_select dut (.local_clk(lclk), .sel(sel), .cdu_clk(cdu));

  initial begin
    #100000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 300; k++) begin
      lclk = 4'($urandom);
      for (int u = 0; u < 16; u++) sel[u] = 2'($urandom);
      #1;
      for (int u = 0; u < 16; u++) begin
        checks++;
        if (cdu[u] !== lclk[sel[u]]) begin failures++; $display("unit %0d", u); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
