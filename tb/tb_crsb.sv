`timescale 1ns/1ps
// tb_crsb: a control switch box at full size (32 pairs per side) with all
// its modules in use at once. Every leaving track has a receiver that
// acknowledges after a random delay. Routes configured:
//   straight: west 3 -> east 5;
//   fanout:   north 0 -> fanout 0 -> east 1, south 2, west 4;
//   fanin:    east 6 and east 7 -> fanin 0 -> west 6;
//   arbiter:  west 10 and west 11 (competing) -> arbiter 0 -> east 10;
//   merge:    south 20 and south 21 (taking turns) -> merge 0 -> north 20.
// Checks: every transfer completes; event counts on every leaving track
// match the routes (fanout copies, fanin joins, arbiter and merge pass
// each transfer once); no leaving track that is not routed moves.
module tb_crsb;
  import gapla_pkg::*;
  localparam int T = 32, ST = 4 * T, NSRC = 4 * T + 14, NSNK = 4 * T + 26, SW = $clog2(NSRC);
  localparam int N = 0, E = 1, S = 2, W = 3;

  logic rst;
  logic [NSNK-1:0] en;
  logic [NSNK-1:0][SW-1:0] sel;
  logic [1:0][3:0] fo_m, fi_m, ar_m, mg_m;
  logic [3:0][T-1:0] in_req, in_ack, out_req, out_ack;
  int events [4][T];
  int checks = 0, failures = 0;

  crsb #(.TRACKS(T)) dut (.rst(rst), .snk_en(en), .snk_sel(sel), .fanout_mask(fo_m), .fanin_mask(fi_m),
    .arb_mask(ar_m), .merge_mask(mg_m), .in_req(in_req), .in_ack(in_ack), .out_req(out_req), .out_ack(out_ack));

  for (genvar d = 0; d < 4; d++) begin : g_d
    for (genvar t = 0; t < T; t++) begin : g_t
      always @(out_req[d][t]) if (!rst) begin
        events[d][t]++;
        #($urandom_range(1, 8));
        out_ack[d][t] = out_req[d][t];
      end
    end
  end

  task automatic route(int snk, int src);
    en[snk] = 1'b1;
    sel[snk] = SW'(src);
  endtask

  task automatic send(int d, int t);
    in_req[d][t] = ~in_req[d][t];
    wait (in_ack[d][t] == in_req[d][t]);
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int expect_ev [4][T];

  initial begin
    rst = 1; en = '0; sel = '0; in_req = '0; out_ack = '0;
    fo_m = '0; fi_m = '0; ar_m = '0; mg_m = '0;
    for (int d = 0; d < 4; d++) for (int t = 0; t < T; t++) begin events[d][t] = 0; expect_ev[d][t] = 0; end
    route(E*T + 5, W*T + 3);
    route(ST + 0, N*T + 0);                 // fanout 0 input
    route(E*T + 1, ST + 0);                 // fanout 0 outputs
    route(S*T + 2, ST + 1);
    route(W*T + 4, ST + 2);
    fo_m[0] = 4'b0111;
    route(ST + 2, E*T + 6);                 // fanin 0 inputs
    route(ST + 3, E*T + 7);
    route(W*T + 6, ST + 8);                 // fanin 0 output
    fi_m[0] = 4'b0011;
    route(ST + 10, W*T + 10);               // arbiter 0 inputs
    route(ST + 11, W*T + 11);
    route(E*T + 10, ST + 10);               // arbiter 0 output
    ar_m[0] = 4'b0011;
    route(ST + 18, S*T + 20);               // merge 0 inputs
    route(ST + 19, S*T + 21);
    route(N*T + 20, ST + 12);               // merge 0 output
    mg_m[0] = 4'b0011;
    #5 rst = 0;
    fork
      repeat (15) begin send(W, 3); #($urandom_range(0, 5)); end
      repeat (15) send(N, 0);
      repeat (15) fork send(E, 6); send(E, 7); join
      repeat (15) begin send(W, 10); #($urandom_range(0, 3)); end
      repeat (15) begin send(W, 11); #($urandom_range(0, 3)); end
      for (int k = 0; k < 30; k++) send(S, 20 + ($urandom_range(0, 1)));
    join
    #20;
    expect_ev[E][5] = 15;
    expect_ev[E][1] = 15; expect_ev[S][2] = 15; expect_ev[W][4] = 15;
    expect_ev[W][6] = 15;
    expect_ev[E][10] = 30;
    expect_ev[N][20] = 30;
    for (int d = 0; d < 4; d++) for (int t = 0; t < T; t++) begin
      checks++;
      if (events[d][t] != expect_ev[d][t]) begin
        failures++;
        $display("side %0d track %0d: %0d events, expected %0d", d, t, events[d][t], expect_ev[d][t]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
