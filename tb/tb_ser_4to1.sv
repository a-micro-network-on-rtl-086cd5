// tb_ser_4to1: with random lane values, the output taken at each UI start must be lane 3,
// 2, 1, 0 for slots 0..3, visible from the next clock, and held between UI starts.
`timescale 1ns / 1ps
module tb_ser_4to1;
  logic clk = 0, rst_n, ui_start, dout;
  logic [3:0] lanes;
  logic [1:0] slot;
  always #5 clk = ~clk;
  ser_4to1 dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask
  logic exp_bit;
  initial begin
    rst_n = 0; ui_start = 0; lanes = 0; slot = 0; exp_bit = 1'b0;   // dout reset value
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      lanes = 4'($urandom); slot = 2'($urandom); ui_start = 1'($urandom);
      if (ui_start) exp_bit = lanes[3 - slot];
      @(posedge clk); #1;
      if (i > 0 || ui_start) check(dout == exp_bit, "lane select / hold");
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
