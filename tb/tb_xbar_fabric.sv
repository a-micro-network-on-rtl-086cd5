// tb_xbar_fabric: random permutations of grants; each output must carry its granted
// input's flit and each input must see fwd exactly when its output is ready.
`timescale 1ns / 1ps
module tb_xbar_fabric;
  import mnoc_pkg::*;
  qentry_t in_entry [5];
  logic [4:0] gnt [5];
  logic [4:0] out_ready, out_valid, in_fwd;
  flit_t out_flit [5];
  xbar_fabric #(.N(5)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  int src [5];
  initial begin
    for (int t = 0; t < 500; t++) begin
      automatic int perm [5] = '{0, 1, 2, 3, 4};
      perm.shuffle();
      for (int i = 0; i < 5; i++) begin
        in_entry[i] = '0; in_entry[i].flit = $urandom;
      end
      for (int o = 0; o < 5; o++) begin
        src[o] = ($urandom_range(0, 3) == 0) ? -1 : perm[o];
        gnt[o] = (src[o] < 0) ? '0 : 5'(1) << src[o];
      end
      out_ready = 5'($urandom);
      #1;
      for (int o = 0; o < 5; o++) begin
        check(out_valid[o] == (src[o] >= 0), "valid");
        if (src[o] >= 0) begin
          check(out_flit[o] == in_entry[src[o]].flit, "data");
          check(in_fwd[src[o]] == out_ready[o], "fwd");
        end
      end
      for (int i = 0; i < 5; i++) if (!(i inside {src})) check(!in_fwd[i], "no fwd ungranted");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
