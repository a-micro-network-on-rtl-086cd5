// tb_phase_detector: a bit stream with transitions at a chosen tick offset inside the UI is
// sampled by the detector (edge phase at offset 0, data phase at offset 4 of each 8-tick
// UI). Transitions after the edge phase must give only dn, transitions at or before it only
// up, and the recovered bits must equal the sent bits.
`timescale 1ns / 1ps
module tb_phase_detector;
  logic clk = 0, rst_n, din, edge_smp, data_smp, up, dn, dbit, dbit_stb;
  always #1 clk = ~clk;
  phase_detector dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask
  int n_up, n_dn;
  bit sent [$];
  int nrx;
  always @(posedge clk) if (rst_n) begin
    if (up) n_up++;
    if (dn) n_dn++;
  end
  task automatic run(int off);
    int t = 0;
    bit cur = 0;
    n_up = 0; n_dn = 0;
    sent.delete(); nrx = 0;
    for (int u = 0; u < 200; u++) begin
      bit nb = 1'($urandom);
      for (int k = 0; k < 8; k++) begin
        @(negedge clk);
        edge_smp = (k == 0); data_smp = (k == 4);
        // the new bit starts at tick `off` of this UI (off in 1..7: late, 0: on time)
        if (k == off) cur = nb;
        din = cur;
        if (k == 4) sent.push_back(cur);
        @(posedge clk); #0.1;
        if (dbit_stb) begin
          check(dbit == sent[nrx], "recovered bit");
          nrx++;
        end
      end
    end
  endtask
  initial begin
    rst_n = 0; din = 0; edge_smp = 0; data_smp = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    run(2);
    check(n_dn > 50 && n_up == 0, "late data -> dn");
    run(0);
    check(n_up > 50 && n_dn == 0, "data on/before edge -> up");
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
