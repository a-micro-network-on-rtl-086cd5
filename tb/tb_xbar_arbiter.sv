// tb_xbar_arbiter: round-robin fairness of the mask-circuit arbiter (with all five inputs
// requesting single-flit packets, grants rotate 0,1,2,3,4,0,...; random request sets are
// checked against a reference round-robin model), and holding of the output for a
// multi-flit packet, including while out_ready is low.
`timescale 1ns / 1ps
module tb_xbar_arbiter;
  logic clk = 0, rst_n;
  always #5 clk = ~clk;
  logic [4:0] req, req_head, req_tail, gnt;
  logic out_ready, xfer;
  xbar_arbiter #(.N(5)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask
  int last;
  function automatic logic [4:0] ref_pick(logic [4:0] r, int l);
    for (int k = 1; k <= 5; k++) if (r[(l + k) % 5]) return 5'(1) << ((l + k) % 5);
    return '0;
  endfunction
  initial begin
    rst_n = 0; req = 0; req_head = 0; req_tail = 0; out_ready = 1;
    repeat (2) @(posedge clk); rst_n = 1;
    last = 4;
    // single-flit packets, random requests
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      req = 5'($urandom); req_head = '1; req_tail = '1;
      out_ready = ($urandom_range(0, 3) != 0);
      #1;
      check(gnt == ref_pick(req, last), "round robin pick");
      check(xfer == (req != 0 && out_ready), "xfer");
      @(posedge clk);
      if (xfer) for (int k = 0; k < 5; k++) if (gnt[k]) last = k;
    end
    // multi-flit packet from input 2 while others request
    @(negedge clk);
    req = 5'b00100; req_head = 5'b00100; req_tail = 0; out_ready = 1;
    @(posedge clk); @(negedge clk);
    req = 5'b11111; req_head = 5'b11011; req_tail = 0;
    for (int i = 0; i < 6; i++) begin
      out_ready = 1'(i % 2);
      #1 check(gnt == 5'b00100, "held for packet");
      @(posedge clk); @(negedge clk);
    end
    req_tail = 5'b00100; out_ready = 1;
    #1 check(gnt == 5'b00100, "tail still granted");
    @(posedge clk); @(negedge clk);
    req = 5'b11011; req_tail = 5'b11011;
    #1 check(gnt == 5'b01000, "next after holder");
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
