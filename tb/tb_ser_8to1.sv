// tb_ser_8to1: loads random bytes and checks the eight bits leave MSB first, one per step,
// with idle cycles between steps holding the bit.
`timescale 1ns / 1ps
module tb_ser_8to1;
  logic clk = 0, rst_n, load, step, dout;
  logic [7:0] din;
  always #5 clk = ~clk;
  ser_8to1 dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask
  initial begin
    rst_n = 0; load = 0; step = 0; din = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int w = 0; w < 50; w++) begin
      automatic logic [7:0] b = 8'($urandom);
      @(negedge clk); din = b; load = 1;
      @(negedge clk); load = 0;
      for (int k = 7; k >= 0; k--) begin
        check(dout == b[k], "bit order");
        repeat ($urandom_range(0, 2)) begin @(negedge clk); check(dout == b[k], "hold"); end
        step = 1; @(negedge clk); step = 0;
      end
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
