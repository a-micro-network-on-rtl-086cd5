// tb_output_module: random stalls on both sides; the flit order must be kept, nothing lost
// or duplicated, and with both sides always ready one flit passes per cycle.
`timescale 1ns / 1ps
module tb_output_module;
  import mnoc_pkg::*;
  logic clk = 0, rst_n;
  always #5 clk = ~clk;
  flit_t in_flit, out_flit;
  logic in_valid, in_ready, out_valid, out_ready;
  output_module dut (.*);
  flit_t model [$];
  int checks = 0, failures = 0, sent = 0, rcvd = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask
  bit full_rate;
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin model.push_back(in_flit); sent++; end
    if (out_valid && out_ready) begin
      check(model.size() > 0 && model.pop_front() == out_flit, "order");
      rcvd++;
    end
  end
  initial begin
    rst_n = 0; in_valid = 0; out_ready = 0; in_flit = 0; full_rate = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (!in_valid || in_ready) begin in_valid = full_rate || 1'($urandom); in_flit = $urandom; end
      out_ready = full_rate || 1'($urandom);
      if (i == 2000) full_rate = 1;
    end
    @(negedge clk); in_valid = 0;
    repeat (5) @(negedge clk);
    check(sent == rcvd && model.size() == 0, "all delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // throughput in full-rate phase
  int fr_cnt = 0;
  always @(posedge clk) if (full_rate && out_valid && out_ready) fr_cnt++;
  final if (fr_cnt < 990) $display("low rate %0d", fr_cnt);
  initial begin
    @(posedge full_rate); repeat (1000) @(posedge clk);
    check(fr_cnt >= 998, "one flit per cycle");
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
