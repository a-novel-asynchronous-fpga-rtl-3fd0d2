`timescale 1ns/1ps
// tb_c_element: drives a 3-input C-element through random input sequences
// and compares its output with a reference: set when all inputs are high,
// cleared when all are low, held otherwise; reset clears it.
module tb_c_element;
  logic       rst;
  logic [2:0] in;
  logic       out, model;
  int checks = 0, failures = 0;

  c_element #(.N(3)) dut (.rst(rst), .in(in), .out(out));

  initial begin
    #100000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; in = 3'b111; #1;
    checks++; if (out !== 1'b0) begin failures++; $display("reset does not clear"); end
    rst = 0; model = 0; #1;
    checks++; if (out !== 1'b1) begin failures++; $display("all-ones does not set"); end
    model = 1;
    for (int k = 0; k < 400; k++) begin
      in = 3'($urandom_range(0, 7));
      #1;
      if (in == 3'b111) model = 1;
      else if (in == 3'b000) model = 0;
      checks++;
      if (out !== model) begin
        failures++;
        $display("step %0d in=%b out=%b expected %b", k, in, out, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
