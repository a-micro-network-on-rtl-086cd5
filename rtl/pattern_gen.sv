// pattern_gen: pattern generator (PG) of the test chip.
//
// A rising edge on start begins a run: first NPRE cycles of training preamble (the preamble
// word on `flit`, with valid low, because it is not part of a packet; the link sends the
// same word whenever it has nothing to send, which trains the byte aligner), then packets
// back to back for as long as start stays high. Each packet is a header towards
// (DST_X, DST_Y) with class GS and length NDATA, followed by NDATA payload flits made of the
// data input pin in bit 31 and 31 pseudo-random bits in bits 30:0. The random bits come from
// a PRBS-31 generator (x^31 + x^28 + 1), stepped once per payload flit.
// Interface: registered valid/ready source; a flit is held while ready is low. data_in is
// sampled when the payload flit is formed. The packet format and the PRBS polynomial are
// this design's own; the description gives the preamble and the 1 + 31 bit split.
module pattern_gen
  import mnoc_pkg::*;
  import link_pkg::*;
#(
  parameter int unsigned NPRE = 64,
  parameter int unsigned NDATA = 1024,
  parameter logic [COORD_W-1:0] DST_X = 4'd2,
  parameter logic [COORD_W-1:0] DST_Y = 4'd0,
  parameter logic GS = 1'b0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  logic  data_in,
  input  logic  ready,
  output flit_t flit,
  output logic  valid,
  output logic  training
);
  typedef enum logic [1:0] {S_IDLE, S_PRE, S_HDR, S_DATA} state_e;
  state_e state;
  logic start_q;
  logic [30:0] prbs;
  logic [LEN_W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      start_q <= 1'b0;
      prbs <= '1;
      cnt <= '0;
      flit <= PREAMBLE;
      valid <= 1'b0;
      training <= 1'b0;
    end else begin
      start_q <= start;
      if (!valid || ready) begin
        valid <= 1'b0;
        training <= 1'b0;
        flit <= PREAMBLE;
        unique case (state)
          S_IDLE: if (start && !start_q) begin
            state <= S_PRE;
            cnt <= '0;
          end
          S_PRE: begin
            training <= 1'b1;
            if (cnt == LEN_W'(NPRE - 1)) begin
              state <= S_HDR;
              cnt <= '0;
            end else cnt <= cnt + 1'b1;
          end
          S_HDR: begin
            if (start) begin
              flit <= make_header(GS, DST_X, DST_Y, LEN_W'(NDATA));
              valid <= 1'b1;
              state <= (NDATA == 0) ? S_HDR : S_DATA;
              cnt <= '0;
            end else state <= S_IDLE;
          end
          S_DATA: begin
            flit <= {data_in, prbs};
            valid <= 1'b1;
            prbs <= {prbs[29:0], prbs[30] ^ prbs[27]};
            if (cnt == LEN_W'(NDATA - 1)) state <= S_HDR;
            else cnt <= cnt + 1'b1;
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end
endmodule
