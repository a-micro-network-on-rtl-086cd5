// tb_mux_controller: all eight modes against the table of sources and destinations.
`timescale 1ns / 1ps
module tb_mux_controller;
  import link_pkg::*;
  test_mode_e mode;
  logic tx_from_switch, out_from_switch;
  lower_src_e lower_src;
  mux_controller dut (.*);
  int checks = 0, failures = 0;
  // expected {tx_from_switch, lower_src, out_from_switch} per mode 0..7
  logic [3:0] exp_tab [8] = '{
    {1'b1, L_UPPER, 1'b0}, {1'b1, L_PG, 1'b1}, {1'b1, L_UPPER, 1'b1}, {1'b0, L_RAW, 1'b0},
    {1'b1, L_RAW, 1'b0}, {1'b1, L_BA, 1'b0}, {1'b1, L_BA, 1'b1}, {1'b1, L_PG, 1'b0}};
  initial begin
    for (int m = 0; m < 8; m++) begin
      mode = test_mode_e'(m);
      #1;
      checks++;
      if ({tx_from_switch, lower_src, out_from_switch} != exp_tab[m]) begin
        failures++;
        $display("FAIL mode %0d", m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
