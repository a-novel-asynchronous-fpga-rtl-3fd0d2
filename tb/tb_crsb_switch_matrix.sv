`timescale 1ns/1ps
// tb_crsb_switch_matrix: random configurations in which every sink is
// either unconnected or takes a distinct source, with random request and
// acknowledge values. Every sink's request must equal its source's, an
// unconnected sink's must be low, and every source's acknowledge must be
// that of the sink that selected it (low if none did).
module tb_crsb_switch_matrix;
  localparam int NSRC = 10, NSNK = 12, SW = $clog2(NSRC);
  logic [NSNK-1:0] en, snk_req, snk_ack;
  logic [NSNK-1:0][SW-1:0] sel;
  logic [NSRC-1:0] src_req, src_ack, exp_ack;
  int checks = 0, failures = 0;

  crsb_switch_matrix #(.NSRC(NSRC), .NSNK(NSNK)) dut (.snk_en(en), .snk_sel(sel), .src_req(src_req),
    .src_ack(src_ack), .snk_req(snk_req), .snk_ack(snk_ack));

  initial begin
    #100000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 300; k++) begin
      logic [NSRC-1:0] taken;
      taken = '0;
      for (int j = 0; j < NSNK; j++) begin
        int s;
        s = $urandom_range(0, NSRC - 1);
        en[j] = !taken[s] && ($urandom_range(0, 3) != 0);
        sel[j] = SW'(s);
        if (en[j]) taken[s] = 1'b1;
      end
      src_req = NSRC'($urandom);
      snk_ack = NSNK'($urandom);
      #1;
      exp_ack = '0;
      for (int j = 0; j < NSNK; j++) begin
        checks++;
        if (snk_req[j] !== (en[j] && src_req[sel[j]])) begin failures++; $display("sink %0d", j); end
        if (en[j]) exp_ack[sel[j]] = snk_ack[j];
      end
      checks++;
      if (src_ack !== exp_ack) begin failures++; $display("src_ack %b expected %b", src_ack, exp_ack); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
