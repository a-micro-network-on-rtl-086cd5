// vc_arbiter: VC arbiter and output MUX of one input module.
//
// Between packets the arbiter looks at the heads of the two queues and gives the GS queue
// priority over the BE queue, as the design description prescribes. The chosen queue's head
// entry is presented to the crossbar (req_valid, req_entry); it may still change from BE to
// GS while the header waits for a crossbar grant. Once the header has been sent, the choice
// is held until the packet's tail flit has been sent, so flits of two packets never
// interleave on one link (holding for whole packets is this design's choice).
//
// Interface: fwd is high in a cycle in which the crossbar takes req_entry; the entry is
// then popped from its queue in the same cycle.
module vc_arbiter
  import mnoc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  qentry_t be_head,
  input  logic    be_valid,
  output logic    be_pop,
  input  qentry_t gs_head,
  input  logic    gs_valid,
  output logic    gs_pop,
  output logic    req_valid,
  output qentry_t req_entry,
  input  logic    fwd,
  output logic    sel_gs     // the queue currently driving the MUX
);
  logic in_pkt;
  logic held_gs;

  always_comb begin
    if (in_pkt) sel_gs = held_gs;
    else sel_gs = gs_valid;          // GS wins whenever it has a packet waiting
    req_entry = sel_gs ? gs_head : be_head;
    req_valid = sel_gs ? gs_valid : be_valid;
    gs_pop = fwd && sel_gs;
    be_pop = fwd && !sel_gs;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_pkt <= 1'b0;
      held_gs <= 1'b0;
    end else if (fwd) begin
      if (req_entry.head) held_gs <= sel_gs;
      in_pkt <= !req_entry.tail;
    end
  end

  a_fwd_valid: assert property (@(posedge clk) disable iff (!rst_n) fwd |-> req_valid);

endmodule
