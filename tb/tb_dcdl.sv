// tb_dcdl: a random bit stream through the delay line; for every code the output must be
// the input delayed by code+1 clocks.
`timescale 1ns / 1ps
module tb_dcdl;
  logic clk = 0, rst_n, din, dout;
  logic [3:0] code;
  always #1 clk = ~clk;
  dcdl #(.TAPS(16)) dut (.clk_os(clk), .*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask
  bit hist [$];
  initial begin
    rst_n = 0; din = 0; code = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (i % 50 == 0) code = 4'($urandom);
      din = 1'($urandom);
      hist.push_back(din);
      #0.5;
      if (i > 20) check(dout == hist[hist.size() - 2 - code], "delay code+1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
