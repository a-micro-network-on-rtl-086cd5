// link_pkg: constants of the 10-Gb/s link and of the test chip around it.
//
// Timing model of the link. The serial line runs at 10 Gb/s (one unit interval, UI, of
// 100 ps). Thirty-two bits make one word at 312.5 MHz. The PLL's 2.5-GHz clock with eight
// phases puts a phase edge every 50 ps, i.e. two per UI. The fast clock of this design,
// clk_os, ticks OS = 8 times per UI (12.5 ps): every fourth tick is one of the eight PLL
// phases, and the ticks in between give the delay line its fine steps. One word therefore
// spans WORD_TICKS = 256 ticks.
package link_pkg;

  localparam int unsigned OS = 8;                    // ticks per UI
  localparam int unsigned WORD_BITS = 32;
  localparam int unsigned LANES = 4;                 // 8:1 serializers / 1:8 deserializers
  localparam int unsigned LANE_BITS = WORD_BITS / LANES;
  localparam int unsigned WORD_TICKS = WORD_BITS * OS;
  localparam int unsigned TICK_W = $clog2(WORD_TICKS);

  // Training preamble of the byte aligner, also sent as the idle word of the link. Its 32
  // rotations are all different, so it can be found at exactly one bit offset.
  localparam logic [WORD_BITS-1:0] PREAMBLE = 32'hF5A0_9C63;

  // The eight test modes of the chip (encoding is this design's own).
  typedef enum logic [2:0] {
    M_SW_UPPER  = 3'd0,  // PG -> upper switch -> data out
    M_SW_LOWER  = 3'd1,  // PG -> lower switch -> data out
    M_SW_CHAIN  = 3'd2,  // PG -> upper switch -> lower switch -> data out
    M_TRX_RAW   = 3'd3,  // 1-to-32 SR -> transceiver -> data out (no alignment)
    M_LINK_RAW  = 3'd4,  // PG -> upper switch -> transceiver -> data out (no alignment)
    M_LINK_BA   = 3'd5,  // PG -> upper switch -> transceiver -> BA -> data out
    M_LINK_FULL = 3'd6,  // PG -> upper switch -> transceiver -> BA -> lower switch -> data out
    M_PG_ONLY   = 3'd7   // PG -> data out
  } test_mode_e;

  // Sources of the multiplexer in front of the lower switch.
  typedef enum logic [1:0] {
    L_UPPER = 2'd0,
    L_PG    = 2'd1,
    L_RAW   = 2'd2,
    L_BA    = 2'd3
  } lower_src_e;

endpackage
