// ser_8to1: one lane of the first stage of the serializer tree.
//
// Loads eight bits of the parallel word at the word boundary and shifts them out MSB first,
// one bit per 2.5-GHz period (every four UI). The 4:1 stage reads the lane bit during one of
// those four UI. Lane j carries word bits j, j+4, ..., j+28 (bit 28+j first).
module ser_8to1 (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  logic       step,
  input  logic [7:0] din,
  output logic       dout
);
  logic [7:0] sr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sr <= '0;
    else if (load) sr <= din;
    else if (step) sr <= {sr[6:0], 1'b0};
  end
  assign dout = sr[7];
endmodule
