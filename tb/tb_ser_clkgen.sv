// tb_ser_clkgen: over two word periods, checks every strobe against the tick number
// computed here: edge/data phases every 8 ticks at offsets 0 and 4, lane steps every
// 32 ticks, one word_last per 256 ticks, and a word clock of period 256 ticks, 50% duty.
`timescale 1ns / 1ps
module tb_ser_clkgen;
  import link_pkg::*;
  logic clk = 0, rst_n;
  always #1 clk = ~clk;
  logic [TICK_W-1:0] tick;
  logic [1:0] slot;
  logic ui_start, edge_smp, data_smp, lane_step, word_last, clk_word;
  ser_clkgen dut (.clk_os(clk), .*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask
  initial begin
    rst_n = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 2 * 256; t++) begin
      automatic int n = t % 256;
      #0.5;
      check(tick == 8'(n), "tick");
      check(slot == 2'((n / 8) % 4), "slot");
      check(edge_smp == (n % 8 == 0) && ui_start == (n % 8 == 0), "edge phase");
      check(data_smp == (n % 8 == 4), "data phase");
      check(lane_step == (n % 32 == 31), "lane step");
      check(word_last == (n == 255), "word last");
      check(clk_word == (n >= 128), "word clock");
      @(negedge clk);
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
