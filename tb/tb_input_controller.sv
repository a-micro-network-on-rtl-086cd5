// tb_input_controller: sends random packets (class, destination, length) and checks that
// each flit is written to the queue of its class with the right head/tail marks and the
// XY-routed direction; checks in_ready against the queue-full inputs.
`timescale 1ns / 1ps
module tb_input_controller;
  import mnoc_pkg::*;
  logic clk = 0, rst_n;
  always #5 clk = ~clk;
  flit_t in_flit;
  logic in_valid, in_ready, be_push, gs_push, be_full, gs_full;
  qentry_t q_data;
  input_controller #(.MY_X(4'd2), .MY_Y(4'd2)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask
  function automatic port_e ref_route(int x, int y);
    if (x > 2) return P_EAST;
    if (x < 2) return P_WEST;
    if (y > 2) return P_NORTH;
    if (y < 2) return P_SOUTH;
    return P_LOCAL;
  endfunction
  initial begin
    rst_n = 0; in_valid = 0; in_flit = '0; be_full = 0; gs_full = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 200; p++) begin
      automatic int x = $urandom_range(0, 4), y = $urandom_range(0, 4), len = $urandom_range(0, 5);
      automatic bit gs = 1'($urandom);
      automatic port_e exp_dest = ref_route(x, y);
      for (int f = 0; f <= len; f++) begin
        @(negedge clk);
        in_flit = (f == 0) ? make_header(gs, 4'(x), 4'(y), 16'(len)) : flit_t'($urandom);
        in_valid = 1;
        be_full = ($urandom_range(0, 3) == 0);
        gs_full = ($urandom_range(0, 3) == 0);
        #1;
        while (!in_ready) begin
          check(f == 0 ? (be_full || gs_full) : (gs ? gs_full : be_full), "ready low only when full");
          check(!be_push && !gs_push, "no push while not ready");
          @(negedge clk);
          be_full = ($urandom_range(0, 3) == 0);
          gs_full = ($urandom_range(0, 3) == 0);
          #1;
        end
        check(gs_push == gs && be_push == !gs, "queue by class");
        check(q_data.flit == in_flit, "flit");
        check(q_data.head == (f == 0), "head mark");
        check(q_data.tail == (f == len), "tail mark");
        check(q_data.dest == exp_dest, "route");
        @(posedge clk);
      end
      @(negedge clk); in_valid = 0;
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
