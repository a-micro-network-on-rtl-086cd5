// transceiver: the 10-Gb/s serial link, transmitter and receiver with all-digital data
// recovery.
//
// Transmit: the 32-bit word (clk_word domain) is split over four 8:1 serializers (lane j
// takes bits j, j+4, ..., j+28); a 4:1 serializer interleaves the lanes into one bit per UI,
// MSB first. Receive: the serial input passes the delay line (dcdl model), the phase detector
// samples it at the edge and data phases of each UI, the CC & FSM loop moves the delay until
// data transitions sit on the edge phase, and four 1:8 deserializers collect the data
// samples. At the end of each word period the 32 samples are assembled into rx_word, which is
// re-registered on clk_word. The receiver does not know where the transmitter's words begin,
// so rx_word is the sent stream rotated by an unknown number of bits; the byte aligner of
// the test chip removes that rotation.
//
// Clocks: clk_os is the fast clock (8 ticks per UI; it stands for the PLL's eight phases,
// see link_pkg); clk_word (312.5 MHz) is generated here and used by the rest of the chip.
// Timing: tx_word is taken at the end of each word period; rx_word appears some word periods
// later, depending on the line delay.
module transceiver
  import link_pkg::*;
(
  input  logic                 clk_os,
  input  logic                 rst_n,
  output logic                 clk_word,
  input  logic [WORD_BITS-1:0] tx_word,
  output logic                 serial_out,
  input  logic                 serial_in,
  output logic [WORD_BITS-1:0] rx_word,
  input  logic [3:0]           track_th,
  output logic                 cdr_locked,
  output logic [3:0]           cdr_code
);
  logic [TICK_W-1:0] tick;
  logic [1:0] slot;
  logic ui_start, edge_smp, data_smp, lane_step, word_last;

  ser_clkgen u_clkgen (
    .clk_os, .rst_n, .tick, .slot, .ui_start, .edge_smp, .data_smp, .lane_step,
    .word_last, .clk_word
  );

  // ---------------- transmitter ----------------
  logic [LANES-1:0] lane_bit;
  for (genvar j = 0; j < LANES; j++) begin : g_tx
    logic [7:0] lane_din;
    always_comb for (int k = 0; k < 8; k++) lane_din[k] = tx_word[4*k + j];
    ser_8to1 u_ser8 (
      .clk(clk_os), .rst_n, .load(word_last), .step(lane_step), .din(lane_din),
      .dout(lane_bit[j])
    );
  end

  ser_4to1 u_ser4 (.clk(clk_os), .rst_n, .lanes(lane_bit), .slot, .ui_start, .dout(serial_out));

  // ---------------- receiver ----------------
  logic dly, up, dn, dbit, dbit_stb;

  dcdl #(.TAPS(16)) u_dcdl (.clk_os, .rst_n, .din(serial_in), .code(cdr_code), .dout(dly));

  phase_detector u_pd (
    .clk(clk_os), .rst_n, .din(dly), .edge_smp, .data_smp, .up, .dn, .dbit, .dbit_stb
  );

  cdr_ctrl #(.CODE_W(4), .CODE_INIT(8), .LOCK_REV(4)) u_cc (
    .clk(clk_os), .rst_n, .up, .dn, .track_th, .code(cdr_code), .locked(cdr_locked)
  );

  logic [7:0] lane_q [LANES];
  for (genvar j = 0; j < LANES; j++) begin : g_rx
    deser_1to8 u_des (
      .clk(clk_os), .rst_n, .en(dbit_stb && (slot == 2'(3 - j))), .d(dbit), .q(lane_q[j])
    );
  end

  logic [WORD_BITS-1:0] rx_os;
  always_ff @(posedge clk_os or negedge rst_n) begin
    if (!rst_n) rx_os <= '0;
    else if (word_last)
      for (int j = 0; j < LANES; j++)
        for (int k = 0; k < 8; k++) rx_os[4*k + j] <= lane_q[j][k];
  end

  always_ff @(posedge clk_word or negedge rst_n) begin
    if (!rst_n) rx_word <= '0;
    else rx_word <= rx_os;
  end
endmodule
