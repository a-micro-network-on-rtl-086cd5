// deser_1to8: one lane of the receive deserializer.
//
// Shifts in the recovered data bit whenever its capture enable is high (once per 2.5-GHz
// period, in its own UI slot); after eight captures q holds the lane's eight bits, first
// received in q[7].
module deser_1to8 (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       d,
  output logic [7:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else if (en) q <= {q[6:0], d};
  end
endmodule
