// tb_deser_1to8: shifts random bits in with random enables; q must hold the last eight
// enabled bits, the first of them in q[7].
`timescale 1ns / 1ps
module tb_deser_1to8;
  logic clk = 0, rst_n, en, d;
  logic [7:0] q, model;
  always #5 clk = ~clk;
  deser_1to8 dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask
  initial begin
    rst_n = 0; en = 0; d = 0; model = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      en = 1'($urandom); d = 1'($urandom);
      if (en) model = {model[6:0], d};
      @(posedge clk); #1;
      check(q == model, "deserialized byte");
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
