`timescale 1ns/1ps
// tb_clock_gen: checks the pausable ring oscillator. Free-running, the
// period must be 2 * dly_cfg * 0.1 ns for two delay settings. A pause
// request must be granted (ac) and must hold the clock low with no rising
// edge until it is withdrawn, after which the clock restarts; two ports
// holding the clock at once must both be released before it restarts.
module tb_clock_gen;
  logic       rst;
  logic [7:0] dly;
  logic [3:0] rc, ac;
  logic       clk;
  int checks = 0, failures = 0;
  int rises;
  realtime t0, t1;

  clock_gen #(.NPORTS(4)) dut (.rst(rst), .dly_cfg(dly), .rc(rc), .ac(ac), .clk(clk));

  always @(posedge clk) rises++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic measure(input int d);
    dly = 8'(d);
    repeat (3) @(posedge clk);
    t0 = $realtime;
    repeat (10) @(posedge clk);
    t1 = $realtime;
    check((t1 - t0) / 10 > 0.2 * d - 0.01 && (t1 - t0) / 10 < 0.2 * d + 0.01,
          $sformatf("period %f for dly %0d", (t1 - t0) / 10, d));
  endtask

  initial begin
    #20000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rises = 0; rc = '0; dly = 8'd30; rst = 1;
    #10 rst = 0;
    measure(30);
    measure(45);
    // single pause
    @(posedge clk); #0.5;
    rc[1] = 1'b1;
    wait (ac[1]);
    check(ac == 4'b0010, "only port 1 granted");
    #1;
    rises = 0;
    #100;
    check(rises == 0 && clk == 1'b0, "clock held low while paused");
    rc[1] = 1'b0;
    #20;
    check(rises >= 2, "clock restarts after release");
    // two ports hold the clock
    @(posedge clk); #0.5;
    rc[0] = 1'b1; rc[3] = 1'b1;
    wait (ac[0] && ac[3]);
    #1 rises = 0;
    rc[0] = 1'b0;
    #50;
    check(rises == 0, "clock still held by port 3");
    rc[3] = 1'b0;
    #20;
    check(rises >= 2, "clock restarts after both released");
    check(ac == 4'b0000, "grants withdrawn");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
