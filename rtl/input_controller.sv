// input_controller: header parsing unit, routing unit and DeMUX of one input module.
//
// The first flit after reset, and the first flit after a packet's last payload flit, is a
// header. The header parsing unit reads its service class and length; the routing unit
// turns the destination coordinates into an output direction (XY routing, this design's
// choice; the description only says the header decides the direction). The DeMUX then
// writes the header and every payload flit of that packet into the GS queue (gs = 1) or
// the BE queue, each entry marked head/tail and tagged with the direction. The DeMUX steers
// only the two write enables: the flit field of q_data is in_flit itself, wired through to
// both queues.
//
// Interface: in_flit/in_valid/in_ready is a valid/ready handshake; a flit moves when both
// are high. While a header is expected, in_ready needs room in both queues, because the
// class is only known from the flit itself; during a packet it needs room in its own queue.
// No pipeline stage: a flit accepted in a cycle is written into the queue at that clock edge.
module input_controller
  import mnoc_pkg::*;
#(
  parameter logic [COORD_W-1:0] MY_X = '0,
  parameter logic [COORD_W-1:0] MY_Y = '0
) (
  input  logic    clk,
  input  logic    rst_n,
  input  flit_t   in_flit,
  input  logic    in_valid,
  output logic    in_ready,
  output logic    be_push,
  output logic    gs_push,
  output qentry_t q_data,
  input  logic    be_full,
  input  logic    gs_full
);
  logic             in_pkt;     // 1 while payload flits of a packet are expected
  logic             cur_gs;
  port_e            cur_dest;
  logic [LEN_W-1:0] remaining;

  header_t hdr;
  assign hdr = header_t'(in_flit);

  logic take;
  logic to_gs;

  always_comb begin
    in_ready = in_pkt ? (cur_gs ? !gs_full : !be_full) : (!gs_full && !be_full);
    take = in_valid && in_ready;
    to_gs = in_pkt ? cur_gs : hdr.gs;
    q_data.flit = in_flit;
    q_data.head = !in_pkt;
    q_data.tail = in_pkt ? (remaining == LEN_W'(1)) : (hdr.len == '0);
    q_data.dest = in_pkt ? cur_dest : xy_route(MY_X, MY_Y, hdr.dst_x, hdr.dst_y);
    gs_push = take && to_gs;
    be_push = take && !to_gs;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_pkt <= 1'b0;
      cur_gs <= 1'b0;
      cur_dest <= P_LOCAL;
      remaining <= '0;
    end else if (take) begin
      if (!in_pkt) begin
        cur_gs <= hdr.gs;
        cur_dest <= q_data.dest;
        remaining <= hdr.len;
        in_pkt <= (hdr.len != '0);
      end else begin
        remaining <= remaining - 1'b1;
        in_pkt <= (remaining != LEN_W'(1));
      end
    end
  end

endmodule
