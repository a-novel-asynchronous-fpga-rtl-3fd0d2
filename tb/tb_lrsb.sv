`timescale 1ns/1ps
// tb_lrsb: random switch configurations and data; each leaving track must
// carry the same track entering on its configured side, or be low when
// disabled.
module tb_lrsb;
  import gapla_pkg::*;
  localparam int W = 24;
  lrsb_cfg_t [3:0][W-1:0] cfg;
  logic [3:0][W-1:0] din, dout;
  int checks = 0, failures = 0;

  lrsb #(.WIDTH(W)) dut (.cfg(cfg), .din(din), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 200; k++) begin
      for (int d = 0; d < 4; d++) for (int t = 0; t < W; t++) cfg[d][t] = lrsb_cfg_t'($urandom);
      for (int d = 0; d < 4; d++) din[d] = W'($urandom);
      #1;
      for (int d = 0; d < 4; d++) for (int t = 0; t < W; t++) begin
        checks++;
        if (dout[d][t] !== (cfg[d][t].en && din[cfg[d][t].from][t])) begin failures++; $display("side %0d track %0d", d, t); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
