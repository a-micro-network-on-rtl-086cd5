// tb_cdr_ctrl: drives up/dn decisions. In ACQUIRE each decision moves the code by one;
// alternating directions lock the loop after LOCK_REV reversals; in TRACK the code moves
// only after track_th net decisions, for several programmed thresholds; the code saturates
// at both ends.
`timescale 1ns / 1ps
module tb_cdr_ctrl;
  logic clk = 0, rst_n, up, dn, locked;
  logic [3:0] track_th, code;
  always #5 clk = ~clk;
  cdr_ctrl #(.CODE_W(4), .CODE_INIT(8), .LOCK_REV(4)) dut (.*);
  int checks = 0, failures = 0;
  logic [3:0] ths [4] = '{4'd1, 4'd6, 4'd15, 4'd0};
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask
  task automatic pulse(bit u, int n);
    repeat (n) begin
      @(negedge clk); up = u; dn = !u;
      @(negedge clk); up = 0; dn = 0;
    end
  endtask
  initial begin
    rst_n = 0; up = 0; dn = 0; track_th = 4'd3;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    check(code == 8 && !locked, "initial code");
    pulse(1, 3);
    check(code == 11, "acquire: one step per decision");
    pulse(0, 1); pulse(1, 1); pulse(0, 1); pulse(1, 1);
    check(locked, "locked after reversals");
    begin
      automatic logic [3:0] c0 = code;
      pulse(1, 2);
      check(code == c0, "track: no step below threshold");
      pulse(1, 1);
      check(code == c0 + 1, "track: step at threshold");
      pulse(0, 1); pulse(1, 1);
      check(code == c0 + 1, "track: up/dn cancel");
    end
    pulse(1, 60);
    check(code == 4'hF, "saturate high");
    pulse(0, 60);
    check(code == 4'h0, "saturate low");
    // the tracking threshold is programmable: a step every track_th net decisions (0 acts as 1)
    foreach (ths[i]) begin
      logic [3:0] c1;
      int n;
      track_th = 4'd1;              // to mid-range with single steps
      pulse(0, 20);
      pulse(1, 6);
      track_th = ths[i];
      n = (ths[i] == 0) ? 1 : ths[i];
      c1 = code;                    // run up to the next step: the accumulator is then clear
      for (int k = 0; k < 16 && code == c1; k++) pulse(1, 1);
      c1 = code;
      pulse(1, n - 1);
      check(n == 1 || code == c1, $sformatf("track_th %0d: no step after %0d decisions", ths[i], n - 1));
      pulse(1, 1);
      check(code == c1 + 1, $sformatf("track_th %0d: step after %0d decisions", ths[i], n));
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
