// mnoc_link_chip: test chip of the micro-network with a 10-Gb/s transmission link.
//
// Two five-port switches are joined through the serial transceiver, with the test logic
// around them: a pattern generator (PG) feeds the north input of the upper switch; the upper
// switch's east output goes, through a D register and the transmit multiplexer, into the
// transceiver; the received words are registered, aligned by the byte aligner (BA) and,
// through the lower multiplexer and another D register, enter the west input of the lower
// switch; the data output pin shows the MSB of the lower switch's east output. The
// multiplexers, set by the 3-bit test mode, also route the PG straight into the lower
// switch, the upper switch straight into the lower one, the 1-to-32 shift register into the
// transceiver, and any of the lower multiplexer's sources past the lower switch to the pin.
// The upper switch sits at mesh position (0,0), the lower at (1,0); PG packets go to (2,0),
// so both switches route them east.
//
// The link carries plain 32-bit words: when the upper switch has no flit to send, the
// transmit multiplexer sends the training preamble instead, and the BA drops it again, so
// packet framing survives the link. The link cannot stall, so the upper switch's east output
// and the lower switch's east output are always ready. The other switch ports are unused on
// this chip (inputs idle, outputs always ready), except the local ports, where the network
// interfaces would attach; those are brought out as ports. Because nothing can stall the
// link, the lower switch's west input must always be ready: traffic from the lower local port
// must not compete with the link for the east output, and a packet for the lower local port
// must be taken without stalls. Otherwise link words would be lost; an assertion flags it.
//
// Clocks: clk_os is the fast clock standing in for the PLL (8 ticks per 100-ps UI); all
// word-rate logic runs on clk_word (312.5 MHz) from the transceiver. rst_n is asynchronous.
// clk_word stays low while rst_n is low, so the word-rate registers are reset by the level
// of rst_n alone; in simulation rst_n must therefore fall from 1, not start at 0.
module mnoc_link_chip
  import mnoc_pkg::*;
  import link_pkg::*;
#(
  parameter int unsigned PG_NPRE = 64,
  parameter int unsigned PG_NDATA = 1024
) (
  input  logic       clk_os,
  input  logic       rst_n,
  output logic       clk_word,
  input  test_mode_e test_mode,
  input  logic       start,
  input  logic       data_in,
  output logic       data_out,
  // serial link pins (LVDS driver and receiver pre-amplifier are outside this design)
  output logic       serial_out,
  input  logic       serial_in,
  input  logic [3:0] cdr_track_th,
  output logic       cdr_locked,
  output logic [3:0] cdr_code,
  output logic       ba_locked,
  output logic [4:0] ba_offset,
  // local ports of the two switches (network-interface side)
  input  flit_t      up_local_in_flit,
  input  logic       up_local_in_valid,
  output logic       up_local_in_ready,
  output flit_t      up_local_out_flit,
  output logic       up_local_out_valid,
  input  logic       up_local_out_ready,
  input  flit_t      lo_local_in_flit,
  input  logic       lo_local_in_valid,
  output logic       lo_local_in_ready,
  output flit_t      lo_local_out_flit,
  output logic       lo_local_out_valid,
  input  logic       lo_local_out_ready
);
  // ---------------- mode decoding ----------------
  logic tx_from_switch, out_from_switch;
  lower_src_e lower_src;
  mux_controller u_muxc (.mode(test_mode), .tx_from_switch, .lower_src, .out_from_switch);

  // ---------------- PG and 1-to-32 SR ----------------
  flit_t pg_flit;
  logic pg_valid, pg_ready, pg_training;
  pattern_gen #(.NPRE(PG_NPRE), .NDATA(PG_NDATA)) u_pg (
    .clk(clk_word), .rst_n, .start, .data_in, .ready(pg_ready),
    .flit(pg_flit), .valid(pg_valid), .training(pg_training)
  );

  logic [31:0] sr_word;
  sr_1to32 u_sr (.clk(clk_word), .rst_n, .din(data_in), .word(sr_word));

  // ---------------- upper switch ----------------
  flit_t up_in [NPORTS], up_out [NPORTS];
  logic [NPORTS-1:0] up_in_valid, up_in_ready, up_out_valid, up_out_ready;

  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      up_in[p] = '0;
      up_in_valid[p] = 1'b0;
      up_out_ready[p] = 1'b1;
    end
    up_in[P_NORTH] = pg_flit;
    up_in_valid[P_NORTH] = pg_valid;
    up_in[P_LOCAL] = up_local_in_flit;
    up_in_valid[P_LOCAL] = up_local_in_valid;
    up_out_ready[P_LOCAL] = up_local_out_ready;
  end
  // PG always feeds the upper switch; in the modes that take PG straight to the lower
  // multiplexer the upper switch's output is simply not selected.
  assign pg_ready = up_in_ready[P_NORTH];
  assign up_local_in_ready = up_in_ready[P_LOCAL];
  assign up_local_out_flit = up_out[P_LOCAL];
  assign up_local_out_valid = up_out_valid[P_LOCAL];

  mnoc_switch #(.MY_X(4'd0), .MY_Y(4'd0)) u_sw_upper (
    .clk(clk_word), .rst_n,
    .in_flit(up_in), .in_valid(up_in_valid), .in_ready(up_in_ready),
    .out_flit(up_out), .out_valid(up_out_valid), .out_ready(up_out_ready)
  );

  // D registers after the upper switch and after the PG
  flit_t up_d, pg_d;
  logic up_d_valid, pg_d_valid;
  always_ff @(posedge clk_word or negedge rst_n) begin
    if (!rst_n) begin
      up_d <= '0;
      up_d_valid <= 1'b0;
      pg_d <= '0;
      pg_d_valid <= 1'b0;
    end else begin
      up_d <= up_out[P_EAST];
      up_d_valid <= up_out_valid[P_EAST];
      pg_d <= pg_flit;
      pg_d_valid <= pg_valid && pg_ready;
    end
  end

  // ---------------- transceiver ----------------
  logic [31:0] tx_word, rx_word, rx_d;

  always_ff @(posedge clk_word or negedge rst_n) begin
    if (!rst_n) tx_word <= PREAMBLE;
    else if (!tx_from_switch) tx_word <= sr_word;
    else tx_word <= up_d_valid ? up_d : PREAMBLE;   // idle fill
  end

  transceiver u_trx (
    .clk_os, .rst_n, .clk_word, .tx_word, .serial_out, .serial_in, .rx_word,
    .track_th(cdr_track_th), .cdr_locked, .cdr_code
  );

  always_ff @(posedge clk_word or negedge rst_n) begin
    if (!rst_n) rx_d <= '0;
    else rx_d <= rx_word;
  end

  // ---------------- byte aligner ----------------
  logic [31:0] ba_word;
  logic ba_valid;
  byte_align #(.MATCH_N(4)) u_ba (
    .clk(clk_word), .rst_n, .rx_word(rx_d), .word(ba_word), .valid(ba_valid),
    .locked(ba_locked), .offset(ba_offset)
  );

  // ---------------- lower multiplexer and lower switch ----------------
  flit_t lo_mux;
  logic lo_mux_valid;
  always_comb begin
    unique case (lower_src)
      L_UPPER: begin lo_mux = up_d; lo_mux_valid = up_d_valid; end
      L_PG:    begin lo_mux = pg_d; lo_mux_valid = pg_d_valid; end
      L_RAW:   begin lo_mux = rx_d; lo_mux_valid = 1'b1; end
      default: begin lo_mux = ba_word; lo_mux_valid = ba_valid; end
    endcase
  end

  flit_t lo_d;
  logic lo_d_valid;
  always_ff @(posedge clk_word or negedge rst_n) begin
    if (!rst_n) begin
      lo_d <= '0;
      lo_d_valid <= 1'b0;
    end else begin
      lo_d <= lo_mux;
      lo_d_valid <= lo_mux_valid;
    end
  end

  flit_t lo_in [NPORTS], lo_out [NPORTS];
  logic [NPORTS-1:0] lo_in_valid, lo_in_ready, lo_out_valid, lo_out_ready;

  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      lo_in[p] = '0;
      lo_in_valid[p] = 1'b0;
      lo_out_ready[p] = 1'b1;
    end
    lo_in[P_WEST] = lo_d;
    lo_in_valid[P_WEST] = lo_d_valid && out_from_switch;
    lo_in[P_LOCAL] = lo_local_in_flit;
    lo_in_valid[P_LOCAL] = lo_local_in_valid;
    lo_out_ready[P_LOCAL] = lo_local_out_ready;
  end
  assign lo_local_in_ready = lo_in_ready[P_LOCAL];
  assign lo_local_out_flit = lo_out[P_LOCAL];
  assign lo_local_out_valid = lo_out_valid[P_LOCAL];

  mnoc_switch #(.MY_X(4'd1), .MY_Y(4'd0)) u_sw_lower (
    .clk(clk_word), .rst_n,
    .in_flit(lo_in), .in_valid(lo_in_valid), .in_ready(lo_in_ready),
    .out_flit(lo_out), .out_valid(lo_out_valid), .out_ready(lo_out_ready)
  );

  // the link has no backpressure, so a word for the lower switch must always be taken
  a_link_no_loss: assert property (@(posedge clk_word) disable iff (!rst_n)
    lo_in_valid[P_WEST] |-> lo_in_ready[P_WEST]);

  // ---------------- data output pin ----------------
  always_ff @(posedge clk_word or negedge rst_n) begin
    if (!rst_n) data_out <= 1'b0;
    else if (out_from_switch) data_out <= lo_out[P_EAST][31];
    else data_out <= lo_mux[31];
  end

endmodule
