`timescale 1ns/1ps
// tb_io_port_matrix: random register-to-port assignments (each port kept
// within 64 registers) and random load strobes. A reference model of the
// 128 registers is updated from the same strobes: an output register takes
// the logic block's bit when its output port loads, an input register takes
// the wire bit when its input port loads. pin_out, pin_oe and lb_din are
// compared after every clock edge. Finally the 64-register limit: 64
// registers on one port is legal, 65 raises cfg_err.
module tb_io_port_matrix;
  import gapla_pkg::*;

  logic clk, rst, err;
  io_reg_cfg_t [N_IO_REGS-1:0] cfg;
  logic [7:0] in_load, out_load;
  logic [N_IO_REGS-1:0] lb_dout, lb_din, pin_in, pin_out, pin_oe, model;
  int checks = 0, failures = 0;

  io_port_matrix dut (.clk(clk), .rst(rst), .cfg(cfg), .in_load(in_load), .out_load(out_load),
    .lb_dout(lb_dout), .lb_din(lb_din), .pin_in(pin_in), .pin_out(pin_out), .pin_oe(pin_oe), .cfg_err(err));

  initial begin clk = 0; forever #5 clk = ~clk; end

  initial begin
    #1000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic random_cfg();
    int cnt [2][8];
    for (int d = 0; d < 2; d++) for (int p = 0; p < 8; p++) cnt[d][p] = 0;
    for (int r = 0; r < N_IO_REGS; r++) begin
      io_reg_cfg_t e;
      e.used    = ($urandom_range(0, 5) != 0);
      e.dir_out = 1'($urandom_range(0, 1));
      e.port    = 3'($urandom_range(0, 7));
      if (cnt[e.dir_out][e.port] >= 64) e.used = 1'b0;
      if (e.used) cnt[e.dir_out][e.port]++;
      cfg[r] = e;
    end
  endtask

  initial begin
    rst = 1; in_load = 0; out_load = 0; lb_dout = 0; pin_in = 0; model = 0;
    random_cfg();
    #12 rst = 0;
    for (int round = 0; round < 6; round++) begin
      random_cfg();
      model = '0;
      rst = 1; #1 rst = 0;
      for (int k = 0; k < 60; k++) begin
        @(negedge clk);
        in_load  = 8'($urandom);
        out_load = 8'($urandom);
        lb_dout  = {$urandom, $urandom, $urandom, $urandom};
        pin_in   = {$urandom, $urandom, $urandom, $urandom};
        @(posedge clk);
        for (int r = 0; r < N_IO_REGS; r++)
          if (cfg[r].used && (cfg[r].dir_out ? out_load[cfg[r].port] : in_load[cfg[r].port]))
            model[r] = cfg[r].dir_out ? lb_dout[r] : pin_in[r];
        #1;
        for (int r = 0; r < N_IO_REGS; r++) begin
          logic oe;
          oe = cfg[r].used && cfg[r].dir_out;
          checks++;
          if (pin_oe[r] !== oe || pin_out[r] !== (oe && model[r]) ||
              lb_din[r] !== (cfg[r].used && !cfg[r].dir_out && model[r])) begin
            failures++;
            if (failures < 10) $display("reg %0d: oe %b out %b din %b model %b", r, pin_oe[r], pin_out[r], lb_din[r], model[r]);
          end
        end
        checks++;
        if (err) begin failures++; $display("cfg_err on a legal configuration"); end
      end
    end
    for (int r = 0; r < N_IO_REGS; r++) cfg[r] = '{used: r < 64, dir_out: 1'b0, port: 3'd5};
    #1 checks++;
    if (err) begin failures++; $display("64 registers flagged"); end
    cfg[64] = '{used: 1'b1, dir_out: 1'b0, port: 3'd5};
    #1 checks++;
    if (!err) begin failures++; $display("65 registers not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
