// tb_byte_align: a word stream (idle preambles, then random data with idle gaps) is
// serialized, delayed by a random number of bits and cut into words again, which rotates it
// as in the byte-aligning figure. The aligner must lock, report the rotation, and output
// exactly the sent data words in order with idle words dropped. Then the rotation is changed
// and the aligner must re-lock on the new one (words during the change are not checked).
`timescale 1ns / 1ps
module tb_byte_align;
  import link_pkg::*;
  logic clk = 0, rst_n;
  always #5 clk = ~clk;
  logic [31:0] rx_word, word;
  logic valid, locked;
  logic [4:0] offset;
  byte_align #(.MATCH_N(4)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask
  bit bits [$];
  logic [31:0] exp_q [$];
  int shift, n_out = 0, n_relock = 0;
  logic [4:0] off_q;
  // produce one sent word into the bit stream
  task automatic send(logic [31:0] w);
    for (int b = 31; b >= 0; b--) bits.push_back(w[b]);
  endtask
  bit ignore;   // words seen while the rotation changes are garbage by nature
  always @(posedge clk) if (rst_n && valid && !ignore) begin
    check(exp_q.size() > 0 && exp_q.pop_front() == word, "aligned data");
    n_out++;
  end
  task automatic run(int nwords, bit with_data);
    for (int i = 0; i < nwords; i++) begin
      logic [31:0] w;
      if (with_data && $urandom_range(0, 3) != 0) begin
        w = $urandom;
        exp_q.push_back(w);
      end else w = PREAMBLE;
      send(w);
      @(negedge clk);
      for (int b = 31; b >= 0; b--) rx_word[b] = bits.pop_front();
    end
  endtask
  initial begin
    rst_n = 0; rx_word = 0; ignore = 0;
    shift = $urandom_range(1, 31);
    for (int i = 0; i < shift; i++) bits.push_back(1'b0);
    repeat (2) @(posedge clk); rst_n = 1;
    run(10, 0);
    check(locked, "locked on preamble");
    // received word k = {prev[shift-1:0]..}: the aligned window starts at bit (32 - shift)
    check(offset == 5'(32 - shift), $sformatf("offset %0d for delay %0d", offset, shift));
    run(300, 1);
    run(4, 0);
    check(exp_q.size() == 0, "all data out");
    // change the rotation by 5 more bits: after re-locking, data flows again
    for (int i = 0; i < 5; i++) bits.push_back(1'b1);
    off_q = offset;
    ignore = 1;
    run(10, 0);
    ignore = 0;
    check(offset != off_q, "re-locked on new rotation");
    exp_q.delete();
    run(100, 1);
    run(4, 0);
    check(exp_q.size() == 0, "all data out after re-lock");
    $display("words out %0d", n_out);
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
