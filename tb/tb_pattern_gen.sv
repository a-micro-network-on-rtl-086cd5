// tb_pattern_gen: after a start edge, expects NPRE training cycles (preamble, not valid),
// then back-to-back packets: header to (2,0) with length NDATA, payload {data_in, PRBS-31}
// with the PRBS computed independently; random ready stalls must hold the flit. Dropping
// start ends the run after the current packet.
`timescale 1ns / 1ps
module tb_pattern_gen;
  import mnoc_pkg::*;
  import link_pkg::*;
  localparam int NPRE = 8, NDATA = 20;
  logic clk = 0, rst_n, start, data_in, ready, valid, training;
  flit_t flit;
  always #5 clk = ~clk;
  pattern_gen #(.NPRE(NPRE), .NDATA(NDATA)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask
  logic [30:0] prbs;
  int n_train = 0, n_hdr = 0, n_data = 0, idx = -1;
  flit_t held;
  bit held_v;
  always @(posedge clk) if (rst_n) begin
    if (training) begin
      n_train++;
      check(!valid && flit == PREAMBLE, "preamble");
    end
    if (held_v) check(valid && flit == held, "stable under stall");
    held_v = valid && !ready;
    held = flit;
    if (valid && ready) begin
      if (idx < 0) begin
        check(flit == make_header(1'b0, 4'd2, 4'd0, 16'(NDATA)), "header");
        n_hdr++;
        idx = 0;
      end else begin
        check(flit[30:0] == prbs, "prbs");
        prbs = {prbs[29:0], prbs[30] ^ prbs[27]};
        n_data++;
        idx++;
        if (idx == NDATA) idx = -1;
      end
    end
  end
  // data_in lands in bit 31 of the payload flit formed at the same clock edge
  bit din_q, load_q;
  always @(posedge clk) begin
    din_q <= data_in;
    load_q <= !valid || ready;
  end
  always @(negedge clk) if (rst_n && load_q && valid && idx >= 0) check(flit[31] == din_q, "data_in in MSB");
  always @(negedge clk) begin
    ready = ($urandom_range(0, 3) != 0);
    data_in = 1'($urandom);
  end
  initial begin
    rst_n = 0; start = 0; prbs = '1;
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (5) @(posedge clk);
    check(!valid, "idle before start");
    @(negedge clk); start = 1;
    repeat (NPRE + 3 * (NDATA + 1) * 2) @(posedge clk);
    @(negedge clk); start = 0;
    repeat (200) @(posedge clk);
    check(n_train == NPRE, "NPRE training cycles");
    check(n_hdr >= 2 && idx == -1, "whole packets, run ended");
    check(n_data == n_hdr * NDATA, "NDATA per packet");
    check(!valid, "idle after stop");
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
