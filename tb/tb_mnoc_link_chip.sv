// tb_mnoc_link_chip: end-to-end test of the test chip at its default parameters.
//
// The serial output is looped back to the serial input through a transmission-line model
// with a random delay of many ticks, so the receiver must recover the sampling phase and the
// byte aligner must find the word rotation. All eight test modes are run, each
// after a reset:
//   mode 0 (upper switch), 5 (link + BA), 7 (PG only): the word in front of the lower
//                      switch must be the PG flit stream, and data_out its MSB
//   mode 1 (lower switch), 2 (switch chain): packets leave the lower switch's east port
//   mode 3 (transceiver): data pin -> 1-to-32 SR -> link -> data pin, raw (unaligned) words
//   mode 4 (raw link): with the link idle, the received word is one fixed rotation of the
//                      training preamble
//   mode 6 (full link): PG -> upper switch -> link -> BA -> lower switch, while a GS packet
//                      is injected at the upper switch's local port and competes for the
//                      east output.
// A reference model records every flit entering the upper switch and checks every packet
// leaving the lower switch's east port flit by flit; the data output pin is checked against
// the selected word's MSB. Every PG packet leaving the lower switch must arrive at one flit
// per cycle (32 bits x 312.5 MHz = 10 Gb/s). Mechanisms counted:
// delay-code steps and CDR lock, BA lock, idle words dropped, crossbar contention, PG stalls,
// GS packets delivered; each must occur at least once.
`timescale 1ns / 1ps
module tb_mnoc_link_chip;
  import mnoc_pkg::*;
  import link_pkg::*;

  logic clk_os = 1'b0;
  always #1 clk_os = ~clk_os;

  logic rst_n, clk_word, start, data_in, data_out, serial_out, serial_in;
  logic cdr_locked, ba_locked;
  test_mode_e test_mode;
  flit_t up_li_flit, up_lo_flit, lo_li_flit, lo_lo_flit;
  logic up_li_valid, up_li_ready, up_lo_valid, lo_li_valid, lo_li_ready, lo_lo_valid;

  mnoc_link_chip dut (
    .clk_os, .rst_n, .clk_word, .test_mode, .start, .data_in, .data_out,
    .serial_out, .serial_in, .cdr_track_th(4'd4), .cdr_locked, .cdr_code(), .ba_locked, .ba_offset(),
    .up_local_in_flit(up_li_flit), .up_local_in_valid(up_li_valid),
    .up_local_in_ready(up_li_ready), .up_local_out_flit(up_lo_flit),
    .up_local_out_valid(up_lo_valid), .up_local_out_ready(1'b1),
    .lo_local_in_flit(lo_li_flit), .lo_local_in_valid(lo_li_valid),
    .lo_local_in_ready(lo_li_ready), .lo_local_out_flit(lo_lo_flit),
    .lo_local_out_valid(lo_lo_valid), .lo_local_out_ready(1'b1)
  );

  // transmission line: delay of line_dly ticks
  int line_dly;
  logic [127:0] line;
  always_ff @(posedge clk_os) line <= {line[126:0], serial_out};
  assign serial_in = line[line_dly];

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------- reference model ----------------
  flit_t q_pg [$], q_loc [$];
  bit bypass_chk;    // 1: lower switch bypassed, words checked in front of it
  int rx_src;        // 0 none, 1 pg, 2 local
  int rx_left, rx_len, n_full_rate = 0;
  longint hdr_cyc;
  longint cyc = 0;
  always @(posedge clk_word) cyc <= cyc + 1;
  int pkts_pg = 0, pkts_loc = 0, flits_rx = 0;

  // reference: every flit accepted at the upper switch inputs
  always @(posedge clk_word) if (rst_n) begin
    if (dut.up_in_valid[P_NORTH] && dut.up_in_ready[P_NORTH]) q_pg.push_back(dut.up_in[P_NORTH]);
    if (up_li_valid && up_li_ready) q_loc.push_back(up_li_flit);
  end

  // lower switch east output checker
  flit_t last_east;
  bit last_east_v, rst_q;
  always @(posedge clk_word) if (rst_n) begin
    if (dut.lo_out_valid[P_EAST] && !bypass_chk) begin
      flit_t f;
      f = dut.lo_out[P_EAST];
      flits_rx++;
      if (rx_left == 0) begin
        header_t h;
        h = header_t'(f);
        if (q_pg.size() > 0 && q_pg[0] == f) begin rx_src = 1; void'(q_pg.pop_front()); end
        else if (q_loc.size() > 0 && q_loc[0] == f) begin rx_src = 2; void'(q_loc.pop_front()); end
        else begin rx_src = 0; check(0, $sformatf("unexpected header %h", f)); end
        rx_left = int'(h.len);
        rx_len = int'(h.len);
        hdr_cyc = cyc;
        if (rx_src == 1) pkts_pg++;
        if (rx_src == 2) pkts_loc++;
      end else begin
        if (rx_src == 1) check(q_pg.size() > 0 && q_pg.pop_front() == f, "pg payload");
        else if (rx_src == 2) check(q_loc.size() > 0 && q_loc.pop_front() == f, "local payload");
        rx_left--;
        // a PG packet is sent back to back, so it must arrive at one flit per cycle
        if (rx_left == 0 && rx_src == 1) begin
          check(cyc - hdr_cyc == rx_len, $sformatf("PG packet of %0d flits took %0d cycles", rx_len + 1, cyc - hdr_cyc + 1));
          n_full_rate++;
        end
      end
    end
  end

  // bypass modes: the word in front of the lower switch must be the PG flit stream
  int n_bypass = 0;
  always @(posedge clk_word) if (rst_n && bypass_chk && dut.lo_mux_valid) begin
    begin flit_t e; e = q_pg.size() > 0 ? q_pg.pop_front() : 32'hDEAD; check(e == dut.lo_mux, $sformatf("bypass word mode %0d got %h exp %h q=%0d", test_mode, dut.lo_mux, e, q_pg.size())); end
    n_bypass++;
  end

  // data pin: MSB of the lower switch east output, one clock later
  int pin_checks_on;
  always @(posedge clk_word) begin
    if (rst_n && pin_checks_on == 1 && last_east_v) check(data_out == last_east[31], $sformatf("data_out pin mode %0d n=%0d", test_mode, n_modes));
    last_east <= dut.out_from_switch ? dut.lo_out[P_EAST] : dut.lo_mux;
    rst_q <= rst_n;
    last_east_v <= rst_n && rst_q;
  end

  // ---------------- mechanism counters ----------------
  int n_code_steps = 0, n_cdr_lock = 0, n_ba_lock = 0, n_idle_drop = 0, n_contend = 0;
  int n_pg_stall = 0, n_modes = 0;
  logic [3:0] code_q;
  logic cdr_locked_q, ba_locked_q;
  always @(posedge clk_os) begin
    if (rst_n && dut.cdr_code != code_q) n_code_steps++;
    if (rst_n && cdr_locked && !cdr_locked_q) n_cdr_lock++;
    code_q <= dut.cdr_code;
    cdr_locked_q <= cdr_locked;
  end
  always @(posedge clk_word) if (rst_n) begin
    if (ba_locked && !ba_locked_q) n_ba_lock++;
    ba_locked_q <= ba_locked;
    if (ba_locked && !dut.ba_valid) n_idle_drop++;
    if (dut.u_sw_upper.req_valid[P_NORTH] && dut.u_sw_upper.req_valid[P_LOCAL] &&
        dut.u_sw_upper.req_entry[P_NORTH].dest == P_EAST &&
        dut.u_sw_upper.req_entry[P_LOCAL].dest == P_EAST) n_contend++;
    if (dut.pg_valid && !dut.pg_ready) n_pg_stall++;
  end

  task automatic do_reset(input test_mode_e m);
    rst_n = 1'b0;
    test_mode = m;
    start = 1'b0;
    up_li_valid = 1'b0;
    lo_li_valid = 1'b0;
    up_li_flit = '0;
    lo_li_flit = '0;
    q_pg.delete();
    q_loc.delete();
    rx_left = 0;
    rx_src = 0;
    pin_checks_on = 0;
    bypass_chk = 0;
    rst_q = 1'b0;
    last_east_v = 1'b0;
    repeat (3 * WORD_TICKS) @(posedge clk_os);
    rst_n = 1'b1;
    n_modes++;
  endtask

  task automatic word_cycles(input int n);
    repeat (n) @(negedge clk_word);
  endtask

  // drive data_in with random bits on the word clock
  always @(negedge clk_word) data_in <= 1'($urandom);

  // GS packet of 5 payload flits from the upper local port towards (2,0)
  task automatic inject_local();
    up_li_flit = make_header(1'b1, 4'd2, 4'd0, 16'd5);
    up_li_valid = 1'b1;
    for (int i = 0; i <= 5; i++) begin
      #0.1;
      while (!up_li_ready) begin @(negedge clk_word); #0.1; end
      @(posedge clk_word);
      @(negedge clk_word);
      up_li_flit = {1'b1, 15'h5A5A, 16'(i)};
    end
    up_li_valid = 1'b0;
  endtask

  test_mode_e pg_modes [4] = '{M_SW_UPPER, M_SW_LOWER, M_LINK_BA, M_PG_ONLY};
  int raw_hist [64];
  bit dq [$];
  int best;
  int raw_rot;
  initial begin
    line_dly = 40 + int'($urandom_range(0, 80));
    if ($value$plusargs("line_dly=%d", line_dly)) ;
    // clk_word is held during reset, so the first reset must be a real falling edge
    rst_n = 1'b1;
    #1;
    $display("line delay %0d ticks", line_dly);

    // ---- PG packets through the single-path modes ----
    foreach (pg_modes[k]) begin
      do_reset(pg_modes[k]);
      bypass_chk = !dut.out_from_switch;
      word_cycles(4);
      pin_checks_on = 1;
      start = 1'b1;
      word_cycles(100 + 300);
      start = 1'b0;
      word_cycles(1200);
      check(q_pg.size() == 0, $sformatf("mode %0d all flits delivered", pg_modes[k]));
    end
    bypass_chk = 0;

    // ---- switch chain ----
    do_reset(M_SW_CHAIN);
    word_cycles(4);
    pin_checks_on = 1;
    start = 1'b1;
    word_cycles(100 + 1024 + 20);
    start = 1'b0;
    word_cycles(1100);
    check(pkts_pg >= 1, "switch chain packet delivered");
    check(q_pg.size() == 0, "switch chain all flits delivered");

    // ---- mode 3: transceiver only, SR words, raw output ----
    do_reset(M_TRX_RAW);
    pin_checks_on = 0;
    dq.delete();
    word_cycles(100);
    for (int i = 0; i < 400; i++) begin
      @(posedge clk_word);
      dq.push_back(data_in);
      #0.1;
      if (i >= 200) begin
        // the pin shows data_in delayed by a fixed latency; find it in the first window
        for (int l = 0; l < 64; l++) if (dq[dq.size()-1-l] == data_out) raw_hist[l]++;
      end
    end
    best = 0;
    for (int l = 0; l < 64; l++) if (raw_hist[l] > raw_hist[best]) best = l;
    $display("transceiver mode: data pin follows data input with %0d-cycle latency", best);
    check(raw_hist[best] == 200, "transceiver mode bit stream");

    // ---- mode 4: raw link words; the idle link must show one fixed rotation of the preamble
    do_reset(M_LINK_RAW);
    pin_checks_on = 1;
    word_cycles(150);
    raw_rot = -1;
    for (int i = 0; i < 100; i++) begin
      int r;
      @(negedge clk_word);
      r = -1;
      for (int k = 0; k < 32; k++) if (dut.lo_mux == 32'({PREAMBLE, PREAMBLE} >> k)) r = k;
      if (i == 0) raw_rot = r;
      check(r >= 0 && r == raw_rot, $sformatf("raw link word %h is the preamble at rotation %0d", dut.lo_mux, raw_rot));
    end
    $display("raw link mode: received words rotated by %0d bits", raw_rot);

    // ---- mode 6: full link with contention ----
    do_reset(M_LINK_FULL);
    pin_checks_on = 1;
    word_cycles(50);
    check(cdr_locked, "CDR locked before traffic");
    check(ba_locked, "BA locked on idle preamble");
    start = 1'b1;
    word_cycles(400);
    inject_local();
    word_cycles(1024 + 200);
    start = 1'b0;
    word_cycles(1300);
    check(pkts_pg >= 2, "mode 6 PG packet delivered");
    check(pkts_loc == 1, "mode 6 local GS packet delivered");

    $display("packets: pg=%0d (%0d checked at full rate) local=%0d flits=%0d", pkts_pg, n_full_rate, pkts_loc, flits_rx);
    $display("mechanisms: code_steps=%0d cdr_lock=%0d ba_lock=%0d idle_drop=%0d contention=%0d pg_stall=%0d modes=%0d bypass_words=%0d",
             n_code_steps, n_cdr_lock, n_ba_lock, n_idle_drop, n_contend, n_pg_stall, n_modes, n_bypass);
    check(n_code_steps > 0, "delay code moved");
    check(n_cdr_lock > 0, "CDR lock");
    check(n_ba_lock > 0, "BA lock");
    check(n_idle_drop > 0, "idle words dropped");
    check(n_contend > 0, "crossbar contention");
    check(n_pg_stall > 0, "PG stalled by switch");
    check(n_modes == 8, "mode switches");
    check(n_bypass > 2000, "bypass modes carried data");
    check(n_full_rate >= 3, "PG packets checked for one flit per cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000 * WORD_TICKS) @(posedge clk_os);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
