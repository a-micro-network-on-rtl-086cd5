// byte_align: byte aligning (BA) module of the test chip.
//
// Serialization and deserialization leave the received words rotated: a received word holds
// the last bits of one sent word and the first bits of the next. The aligner keeps the
// previous received word and looks at all 32 windows of the 64-bit pair {prev, cur}. When the
// training preamble shows up at the same offset in MATCH_N consecutive words, that offset is
// taken (locked); later it is replaced only if the preamble appears MATCH_N times in a row at
// another offset. Once locked, every window at the offset is output; windows equal to the
// preamble (which the link sends when idle) are marked not valid, all others valid.
// Interface: rx_word in, word/valid out one clock later; locked and offset for observation.
// Matching the preamble at every offset follows the description; MATCH_N and the
// idle-word rule are this design's own.
module byte_align
  import link_pkg::*;
#(
  parameter int unsigned MATCH_N = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [WORD_BITS-1:0] rx_word,
  output logic [WORD_BITS-1:0] word,
  output logic                 valid,
  output logic                 locked,
  output logic [4:0]           offset
);
  logic [WORD_BITS-1:0] prev;
  logic [2*WORD_BITS-1:0] pair;
  logic found;
  logic [4:0] found_off, cand_off;
  logic [3:0] run;
  logic [WORD_BITS-1:0] aligned;

  always_comb begin
    pair = {prev, rx_word};
    found = 1'b0;
    found_off = '0;
    for (int s = WORD_BITS - 1; s >= 0; s--) begin
      if (pair[s +: WORD_BITS] == PREAMBLE) begin
        found = 1'b1;
        found_off = 5'(s);
      end
    end
    aligned = pair[{1'b0, offset} +: WORD_BITS];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev <= '0;
      cand_off <= '0;
      run <= '0;
      offset <= '0;
      locked <= 1'b0;
      word <= '0;
      valid <= 1'b0;
    end else begin
      prev <= rx_word;
      word <= aligned;
      valid <= locked && (aligned != PREAMBLE);
      if (!found) begin
        run <= '0;
      end else if (run != '0 && found_off == cand_off) begin
        if (run == 4'(MATCH_N - 1)) begin
          offset <= cand_off;
          locked <= 1'b1;
        end else begin
          run <= run + 1'b1;
        end
      end else begin
        cand_off <= found_off;
        run <= 4'd1;
      end
    end
  end
endmodule
