// tb_sr_1to32: shifts random bits in and compares the word with a software shift register;
// bit 31 must equal the input of 31 cycles earlier.
`timescale 1ns / 1ps
module tb_sr_1to32;
  logic clk = 0, rst_n, din;
  logic [31:0] word, model;
  always #5 clk = ~clk;
  sr_1to32 dut (.*);
  int checks = 0, failures = 0;
  bit hist [$];
  initial begin
    rst_n = 0; din = 0; model = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      din = 1'($urandom);
      hist.push_back(din);
      model = {model[30:0], din};
      @(posedge clk); #1;
      checks++;
      if (word != model) begin failures++; $display("FAIL word"); end
      if (i >= 31) begin
        checks++;
        if (word[31] != hist[i - 31]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
