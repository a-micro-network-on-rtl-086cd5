// tb_input_module: mixed BE and GS packets with random crossbar acceptance. Checks that the
// crossbar sees whole packets, each with the routed direction and correct head/tail marks,
// that order is kept within each class, and that a GS packet overtakes a BE packet that
// arrived earlier at least once (GS priority).
`timescale 1ns / 1ps
module tb_input_module;
  import mnoc_pkg::*;
  logic clk = 0, rst_n;
  always #5 clk = ~clk;
  flit_t in_flit;
  logic in_valid, in_ready, req_valid, fwd, sel_gs;
  qentry_t req_entry;
  input_module #(.MY_X(4'd1), .MY_Y(4'd1)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask
  // expected flits per class; header rsvd field carries a packet number
  flit_t exp_q [2][$];
  int left, cur_cls, n_pkts = 0, overtakes = 0, last_be_num = -1;
  int max_gs_num_seen;
  always @(posedge clk) if (rst_n && req_valid && fwd) begin
    flit_t f;
    f = req_entry.flit;
    if (left == 0) begin
      header_t h;
      h = header_t'(f);
      cur_cls = h.gs;
      check(req_entry.head, "head mark");
      check(exp_q[cur_cls].size() > 0 && exp_q[cur_cls].pop_front() == f, "header order in class");
      check(req_entry.dest == ((h.dst_x > 1) ? P_EAST : (h.dst_x < 1) ? P_WEST : P_LOCAL), "dest");
      left = h.len;
      n_pkts++;
      check(req_entry.tail == (left == 0), "tail on header");
      if (h.gs == 0) last_be_num = int'(h.rsvd);
      else if (exp_q[0].size() > 0) begin
        header_t b;
        b = header_t'(exp_q[0][0]);
        if (int'(b.rsvd) < int'(h.rsvd)) overtakes++;
      end
    end else begin
      check(!req_entry.head, "no head mid packet");
      check(exp_q[cur_cls].size() > 0 && exp_q[cur_cls].pop_front() == f, "payload order");
      left--;
      check(req_entry.tail == (left == 0), "tail mark");
    end
  end
  bit hold;
  always @(negedge clk) fwd = !hold && req_valid && ($urandom_range(0, 2) == 0);
  initial begin
    rst_n = 0; in_valid = 0; in_flit = 0; left = 0;
    hold = 1;
    repeat (2) @(posedge clk); rst_n = 1;
    // directed: a BE packet waits at the crossbar, then a GS packet arrives and goes first
    for (int p = 0; p < 2; p++) begin
      header_t h;
      h = header_t'(make_header(p == 1, 4'd2, 4'd1, 16'd0));
      h.rsvd = 7'(p);
      @(negedge clk);
      in_valid = 1; in_flit = flit_t'(h);
      exp_q[p].push_back(in_flit);
      @(posedge clk);
    end
    @(negedge clk); in_valid = 0;
    check(sel_gs && req_entry.flit == exp_q[1][0], "GS offered first");
    hold = 0;
    for (int p = 2; p < 120; p++) begin
      automatic bit gs = ($urandom_range(0, 2) == 0);
      automatic int len = $urandom_range(0, 6);
      header_t h;
      h = header_t'(make_header(gs, 4'($urandom_range(0, 2)), 4'd1, 16'(len)));
      h.rsvd = 7'(p);
      for (int f = 0; f <= len; f++) begin
        @(negedge clk);
        in_valid = 1;
        in_flit = (f == 0) ? flit_t'(h) : flit_t'($urandom);
        exp_q[gs].push_back(in_flit);
        #1;
        while (!in_ready) begin @(negedge clk); #1; end
        @(posedge clk);
      end
      @(negedge clk); in_valid = 0;
    end
    repeat (200) @(posedge clk);
    check(exp_q[0].size() == 0 && exp_q[1].size() == 0, "all delivered");
    check(overtakes > 0, "GS overtook BE");
    $display("packets %0d, GS overtakes %0d", n_pkts, overtakes);
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
