// tb_flit_fifo: random push/pop against a queue model; checks order, full/empty flags,
// and that a full queue accepts a push when it pops in the same cycle is NOT required
// (push is only issued when not full).
`timescale 1ns / 1ps
module tb_flit_fifo;
  import mnoc_pkg::*;
  logic clk = 0, rst_n;
  always #5 clk = ~clk;
  logic push, pop, full, not_empty;
  qentry_t wr_data, rd_data;
  flit_fifo #(.DEPTH(4)) dut (.*);
  qentry_t model [$];
  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  initial begin
    rst_n = 0; push = 0; pop = 0; wr_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      check(full == (model.size() == 4), "full flag");
      check(not_empty == (model.size() != 0), "empty flag");
      if (model.size() != 0) check(rd_data == model[0], "head data");
      push = !full && ($urandom_range(0, 2) != 0);
      pop = not_empty && ($urandom_range(0, 2) != 0);
      wr_data = qentry_t'({$urandom, $urandom});
      @(posedge clk);
      if (pop) void'(model.pop_front());
      if (push) model.push_back(wr_data);
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
