// tb_transceiver: serial loopback through a line with a random delay (in ticks of 1/8 UI).
// Random words are sent; after the data recovery has locked, the received bit stream must
// equal the sent bit stream shifted by one constant number of bits, for 300 words in a row.
// Then the line delay drifts: it steps by one tick (1/8 UI) three times, 25 words apart, and
// later steps back. The data recovery must track the drift: the delay code must follow it and
// the bit stream must stay intact, with the same bit delay, for another 300 words.
// Also checks the rates: the word clock period is 256 ticks (32 UI) and the serial output
// changes only on UI boundaries (every 8 ticks), i.e. 10 Gb/s for a 312.5-MHz word clock.
`timescale 1ns / 1ps
module tb_transceiver;
  import link_pkg::*;
  logic clk_os = 0, rst_n, clk_word, serial_out, serial_in, cdr_locked;
  logic [31:0] tx_word, rx_word;
  logic [3:0] cdr_code;
  always #1 clk_os = ~clk_os;
  transceiver dut (.*, .track_th(4'd4));
  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask
  int dly;
  logic [255:0] line;
  always_ff @(posedge clk_os) line <= {line[254:0], serial_out};
  assign serial_in = line[dly];

  // tick counting for rate checks
  int tick_n = 0, last_tr = -1, bad_tr = 0, last_wclk = -1, wper_bad = 0, n_wclk = 0;
  logic so_q, wc_q;
  always @(posedge clk_os) begin
    tick_n++;
    if (rst_n && serial_out != so_q) begin
      if (last_tr >= 0 && (tick_n - last_tr) % OS != 0) bad_tr++;
      last_tr = tick_n;
    end
    if (rst_n && clk_word && !wc_q) begin
      if (last_wclk >= 0 && tick_n - last_wclk != WORD_TICKS) wper_bad++;
      last_wclk = tick_n;
      n_wclk++;
    end
    so_q = serial_out;
    wc_q = clk_word;
  end

  bit txb [$], rxb [$];
  int words = 0;
  always @(posedge clk_word) begin
    #0.1;
    tx_word = $urandom;
    for (int b = 31; b >= 0; b--) txb.push_back(tx_word[b]);
    for (int b = 31; b >= 0; b--) rxb.push_back(rx_word[b]);
    words++;
  end

  int best_d, nmatch, drift, code0, code1;
  initial begin
    rst_n = 0; tx_word = 0;
    dly = $urandom_range(3, 200);
    $display("line delay %0d ticks", dly);
    repeat (600) @(posedge clk_os);
    rst_n = 1;
    wait (words == 400);
    check(cdr_locked, "data recovery locked");
    // find the bit delay over the last 300 words
    best_d = -1;
    for (int d = 0; d < 32 * 10; d++) begin
      nmatch = 0;
      for (int k = 100 * 32; k < 400 * 32; k++) if (rxb[k] == txb[k - d]) nmatch++;
      if (nmatch == 300 * 32) begin best_d = d; break; end
    end
    $display("stream delay %0d bits, code %0d", best_d, cdr_code);
    check(best_d >= 0, "received stream equals sent stream");

    // drift phase
    drift = ($urandom_range(0, 1) != 0) ? 1 : -1;
    code0 = int'(cdr_code);
    for (int k = 0; k < 3; k++) begin
      wait (words == 420 + 25 * k);
      dly += drift;
    end
    wait (words == 510);
    code1 = int'(cdr_code);
    for (int k = 0; k < 3; k++) begin
      wait (words == 520 + 25 * k);
      dly -= drift;
    end
    wait (words == 700);
    $display("drift %0d ticks: code %0d -> %0d -> %0d", 3 * drift, code0, code1, cdr_code);
    check((code0 - code1) * drift >= 2, "delay code follows the line drift");
    nmatch = 0;
    for (int k = 400 * 32; k < 700 * 32; k++) if (rxb[k] == txb[k - best_d]) nmatch++;
    check(best_d >= 0 && nmatch == 300 * 32, "bit stream intact while the line drifts");
    check(bad_tr == 0, "serial output changes on UI boundaries");
    check(wper_bad == 0 && n_wclk > 300, "word clock period 256 ticks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (900 * WORD_TICKS) @(posedge clk_os);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
