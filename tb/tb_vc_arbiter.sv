// tb_vc_arbiter: GS head beats BE head between packets; a packet, once its header has gone,
// keeps the MUX until its tail even when the other queue has a packet; pops follow fwd.
// A random phase then checks the selection every cycle against a reference model.
`timescale 1ns / 1ps
module tb_vc_arbiter;
  import mnoc_pkg::*;
  logic clk = 0, rst_n;
  always #5 clk = ~clk;
  qentry_t be_head, gs_head, req_entry;
  logic be_valid, be_pop, gs_valid, gs_pop, req_valid, fwd, sel_gs;
  vc_arbiter dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask
  function automatic qentry_t ent(bit h, bit t, int v);
    qentry_t e; e.head = h; e.tail = t; e.dest = P_EAST; e.flit = 32'(v); return e;
  endfunction
  qentry_t be_q [$], gs_q [$];
  bit m_in_pkt, m_gs;
  int n_fwd = 0;
  task automatic add_pkt(ref qentry_t q [$], input int base);
    int len;
    len = $urandom_range(1, 4);
    for (int i = 0; i < len; i++) q.push_back(ent(i == 0, i == len - 1, base + i));
  endtask
  initial begin
    rst_n = 0; be_valid = 0; gs_valid = 0; fwd = 0; be_head = '0; gs_head = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    // both heads waiting: GS first
    @(negedge clk);
    be_valid = 1; be_head = ent(1, 0, 100);
    gs_valid = 1; gs_head = ent(1, 0, 200);
    #1 check(sel_gs && req_entry.flit == 200 && req_valid, "GS priority");
    // BE only: BE selected
    gs_valid = 0;
    #1 check(!sel_gs && req_entry.flit == 100, "BE when no GS");
    // start BE packet: header forwarded
    fwd = 1;
    #1 check(be_pop && !gs_pop, "pop BE");
    @(posedge clk); @(negedge clk);
    // GS arrives mid-packet: BE keeps the MUX
    fwd = 0; be_head = ent(0, 0, 101); gs_valid = 1; gs_head = ent(1, 1, 201);
    #1 check(!sel_gs && req_entry.flit == 101, "hold BE packet against GS");
    fwd = 1; @(posedge clk); @(negedge clk);
    be_head = ent(0, 1, 102);
    #1 check(!sel_gs, "hold to tail");
    @(posedge clk); @(negedge clk);
    // after tail, GS wins
    be_head = ent(1, 1, 103);
    #1 check(sel_gs && req_entry.flit == 201 && gs_pop, "GS after BE tail");
    @(posedge clk); @(negedge clk);
    gs_valid = 0;
    #1 check(!sel_gs && req_entry.flit == 103, "BE after single-flit GS");
    fwd = 0;

    // random phase: random packets in both queues, random crossbar accepts. Reference: between
    // packets GS wins if it has an entry; inside a packet the queue that sent the header
    // keeps the MUX until the tail has been sent.
    rst_n = 0; gs_valid = 0; be_valid = 0;
    @(negedge clk); rst_n = 1;
    m_in_pkt = 0; m_gs = 0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      bit exp_gs;
      if (be_q.size() < 3 && $urandom_range(0, 3) == 0) add_pkt(be_q, 1000 * cyc);
      if (gs_q.size() < 3 && $urandom_range(0, 7) == 0) add_pkt(gs_q, 1000 * cyc + 500);
      be_valid = be_q.size() > 0; if (be_valid) be_head = be_q[0];
      gs_valid = gs_q.size() > 0; if (gs_valid) gs_head = gs_q[0];
      exp_gs = m_in_pkt ? m_gs : gs_valid;
      #1;
      fwd = req_valid && ($urandom_range(0, 2) != 0);
      #1;
      check(sel_gs == exp_gs && req_valid == (exp_gs ? gs_valid : be_valid) &&
            (!req_valid || req_entry == (exp_gs ? gs_q[0] : be_q[0])) &&
            gs_pop == (fwd && exp_gs) && be_pop == (fwd && !exp_gs), "random: selection");
      if (fwd) begin
        qentry_t e;
        e = exp_gs ? gs_q.pop_front() : be_q.pop_front();
        if (e.head) m_gs = exp_gs;
        m_in_pkt = !e.tail;
        n_fwd++;
      end
      @(negedge clk);
    end
    fwd = 0;
    check(n_fwd > 1000, "random: traffic moved");
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
