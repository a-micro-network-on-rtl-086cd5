// tb_mnoc_switch: all five inputs send random packets (both classes) to random
// destinations around the switch at (1,1), with random stalls on all outputs. Checks that
// each packet leaves on its XY-routed port, whole and uninterrupted, in order per
// input/output pair and class, and that every packet arrives. Also checks the two-cycle latency and
// one-flit-per-cycle rate of a single stream through an idle switch, and that output
// contention occurred.
`timescale 1ns / 1ps
module tb_mnoc_switch;
  import mnoc_pkg::*;
  logic clk = 0, rst_n;
  always #5 clk = ~clk;
  flit_t in_flit [5], out_flit [5];
  logic [4:0] in_valid, in_ready, out_valid, out_ready;
  mnoc_switch #(.MY_X(4'd1), .MY_Y(4'd1)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask
  function automatic int route(int x, int y);
    if (x > 1) return 1; if (x < 1) return 2; if (y > 1) return 0; if (y < 1) return 3; return 4;
  endfunction
  // expected flits per (input, output)
  flit_t exp_q [5][5][2][$];   // [input][output][class]
  int left [5], src [5], cls [5];
  int n_contend = 0, total_sent = 0, total_rcvd = 0;
  bit random_stall;
  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < 5; o++) if (out_valid[o] && out_ready[o]) begin
      flit_t f;
      f = out_flit[o];
      total_rcvd++;
      if (left[o] == 0) begin
        header_t h;
        h = header_t'(f);
        src[o] = int'(h.rsvd[6:4]);
        cls[o] = int'(h.gs);
        check(route(h.dst_x, h.dst_y) == o, "routed port");
        left[o] = h.len;
      end else left[o]--;
      if (exp_q[src[o]][o][cls[o]].size() == 0) begin check(0, $sformatf("empty q src%0d o%0d f=%h", src[o], o, f)); end else begin flit_t e; e = exp_q[src[o]][o][cls[o]].pop_front(); check(e == f, $sformatf("flit order src%0d o%0d got %h exp %h", src[o], o, f, e)); end
    end
    for (int o = 0; o < 5; o++) begin
      int n;
      n = 0;
      for (int i = 0; i < 5; i++)
        if (dut.req_valid[i] && dut.req_entry[i].head && dut.req_entry[i].dest == port_e'(o)) n++;
      if (n > 1) n_contend++;
    end
  end
  always @(negedge clk) out_ready = random_stall ? 5'($urandom) : '1;

  task automatic send_packets(input int i, input int n);
    for (int p = 0; p < n; p++) begin
      int x = $urandom_range(0, 2), y = $urandom_range(0, 2), len = $urandom_range(0, 8);
      header_t h = header_t'(make_header(1'($urandom), 4'(x), 4'(y), 16'(len)));
      h.rsvd = {3'(i), 4'(p)};
      for (int f = 0; f <= len; f++) begin
        @(negedge clk);
        in_valid[i] = 1;
        in_flit[i] = (f == 0) ? flit_t'(h) : flit_t'($urandom);
        exp_q[i][route(x, y)][h.gs].push_back(in_flit[i]);
        total_sent++;
        #1;
        while (!in_ready[i]) begin @(negedge clk); #1; end
        @(posedge clk);
      end
      @(negedge clk); in_valid[i] = 0;
    end
  endtask

  int t0, t1;
  initial begin
    rst_n = 0; in_valid = 0; random_stall = 0;
    for (int i = 0; i < 5; i++) begin in_flit[i] = 0; left[i] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    // latency and rate of a single stream: west input to east, 8 payload flits
    @(negedge clk);
    in_valid[2] = 1;
    in_flit[2] = make_header(1'b0, 4'd2, 4'd1, 16'd8) | (32'h2 << 20);
    exp_q[2][1][0].push_back(in_flit[2]);
    total_sent++;
    t0 = $time;
    fork begin wait (out_valid[1]); t1 = $time; end join_none
    for (int f = 0; f < 8; f++) begin
      @(negedge clk);
      in_flit[2] = 32'(f);
      exp_q[2][1][0].push_back(in_flit[2]);
      total_sent++;
    end
    @(negedge clk); in_valid[2] = 0;
    check((t1 - t0 + 5) / 10 == 2, $sformatf("two-cycle latency (%0d)", t1 - t0));
    repeat (9) @(posedge clk);
    check(total_rcvd == 9, "one flit per cycle");
    random_stall = 1;
    fork
      send_packets(0, 60);
      send_packets(1, 60);
      send_packets(2, 60);
      send_packets(3, 60);
      send_packets(4, 60);
    join
    random_stall = 0;
    repeat (100) @(posedge clk);
    check(total_sent == total_rcvd, "all flits delivered");
    check(n_contend > 0, "contention happened");
    $display("flits %0d, contention cycles %0d", total_rcvd, n_contend);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
