// sr_1to32: 1-to-32 shift register of the test chip.
//
// Shifts the single data input pin into a 32-bit register, one bit per word clock, and
// offers the register as the transceiver's parallel input in the transceiver test mode.
// The newest bit is bit 0, so bit 31 (the MSB that the data output pin shows) is the input
// delayed by 31 cycles plus the link latency. Sliding one bit per cycle is this design's
// reading; the description only gives the block's name and purpose.
module sr_1to32 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        din,
  output logic [31:0] word
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) word <= '0;
    else word <= {word[30:0], din};
  end
endmodule
