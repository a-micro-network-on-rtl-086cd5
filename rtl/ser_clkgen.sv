// ser_clkgen: clock buffer and serializer clock generator of the transceiver.
//
// Counts ticks of the fast clock within a word and decodes the strobes every other block of
// the link runs on. In silicon these are the eight PLL phases and the divided clocks of the
// serializer tree; here they are enables of one fast clock (see link_pkg for the time base).
//   slot       UI position inside one 2.5-GHz period (0..3), picks the lane of the 4:1 stage
//   ui_start   first tick of a UI (4:1 serializer update)
//   edge_smp   PLL phase at the UI boundary (edge sample of the phase detector)
//   data_smp   PLL phase at mid-UI (data sample)
//   lane_step  last tick of a 2.5-GHz period (8:1 serializers shift)
//   word_last  last tick of a word (8:1 serializers load, received word is assembled)
//   clk_word   312.5-MHz word clock, a divided clock that rises in the middle of the word
module ser_clkgen
  import link_pkg::*;
(
  input  logic              clk_os,
  input  logic              rst_n,
  output logic [TICK_W-1:0] tick,
  output logic [1:0]        slot,
  output logic              ui_start,
  output logic              edge_smp,
  output logic              data_smp,
  output logic              lane_step,
  output logic              word_last,
  output logic              clk_word
);
  always_ff @(posedge clk_os or negedge rst_n) begin
    if (!rst_n) tick <= '0;
    else tick <= tick + 1'b1;
  end

  assign slot = tick[4:3];
  assign ui_start = (tick[2:0] == 3'd0);
  assign edge_smp = (tick[2:0] == 3'd0);
  assign data_smp = (tick[2:0] == 3'd4);
  assign lane_step = (tick[4:0] == 5'd31);
  assign word_last = (tick == '1);
  assign clk_word = tick[TICK_W-1];
endmodule
