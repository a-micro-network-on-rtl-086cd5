// xbar_arbiter: crossbar arbiter of one output port (one of five, one per output: the
// distributed scheme of the design description).
//
// Requests come from the input modules whose current head-of-line flit is bound for this
// output. A free output is granted by a round-robin arbiter built from a mask circuit (MC):
// the mask keeps only requesters numbered above the last winner; if any of them requests,
// the lowest of those wins, otherwise the lowest unmasked requester wins. The winner is
// therefore the next requester after the last one, which gives every input a turn. The mask
// is updated when a header is granted. A granted output stays with its input until the
// packet's tail flit has passed (wormhole-style hold, this design's choice).
//
// Interface: req/req_head/req_tail per input, out_ready from the output module. gnt is
// one-hot and combinational; xfer is high when a flit crosses this output in the cycle.
module xbar_arbiter
  import mnoc_pkg::*;
#(
  parameter int unsigned N = NPORTS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic [N-1:0] req_head,
  input  logic [N-1:0] req_tail,
  input  logic         out_ready,
  output logic [N-1:0] gnt,
  output logic         xfer
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic          locked;
  logic [IW-1:0] owner;
  logic [N-1:0]  mask;
  logic [N-1:0]  new_req, masked, pick;
  logic [IW-1:0] gidx;

  function automatic logic [N-1:0] lowest(logic [N-1:0] v);
    return v & (~v + 1'b1);
  endfunction

  always_comb begin
    new_req = req & req_head;
    masked = new_req & mask;
    pick = (masked != '0) ? lowest(masked) : lowest(new_req);
    if (locked) gnt = req & (N'(1) << owner);
    else gnt = pick;
    xfer = (gnt != '0) && out_ready;
    gidx = '0;
    for (int i = 0; i < N; i++) if (gnt[i]) gidx = IW'(i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked <= 1'b0;
      owner <= '0;
      mask <= '0;
    end else if (xfer) begin
      if (!locked) begin
        // header granted: rotate priority past the winner
        mask <= ~((N'(1) << (gidx + 1'b1)) - 1'b1);
        owner <= gidx;
      end
      locked <= !req_tail[gidx];
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));

endmodule
