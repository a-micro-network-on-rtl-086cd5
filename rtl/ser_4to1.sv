// ser_4to1: second stage of the serializer tree, the 10-Gb/s multiplexer.
//
// At the start of every UI it registers the bit of one of the four lanes: lane 3 in slot 0,
// then lanes 2, 1, 0, so that a word leaves MSB first. The choice is made by two levels of
// two-input multiplexers (slot[0] picks within a lane pair, slot[1] between the pairs), the
// two-input tree the design description argues for. The serial output changes one tick
// after the UI start.
module ser_4to1 (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] lanes,
  input  logic [1:0] slot,
  input  logic       ui_start,
  output logic       dout
);
  logic hi_pair, lo_pair, sel_bit;
  always_comb begin
    hi_pair = slot[0] ? lanes[2] : lanes[3];   // slots 0, 1
    lo_pair = slot[0] ? lanes[0] : lanes[1];   // slots 2, 3
    sel_bit = slot[1] ? lo_pair : hi_pair;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dout <= 1'b0;
    else if (ui_start) dout <= sel_bit;
  end
endmodule
