// mnoc_switch: five-port packet switch of the micro-network (ports N, E, W, S, Local).
//
// Five input modules each buffer incoming packets in a BE and a GS queue and offer one head
// flit at a time, GS first. Five distributed crossbar arbiters (one per output, round robin
// with a mask circuit) connect inputs to outputs for whole packets through the 5x5 crossbar
// fabric, and five output modules hand the flits on under a valid/ready handshake.
//
// Interface: per port p a flit bus with valid/ready in each direction; the port index is
// mnoc_pkg::port_e. MY_X/MY_Y place the switch in the mesh for XY routing.
// Timing: a flit entering at cycle t is in the queue at t+1, crosses the crossbar in that
// cycle into the output buffer and is on the output at t+2 at the earliest (two cycles of
// latency); each port moves one flit per cycle.
module mnoc_switch
  import mnoc_pkg::*;
#(
  parameter logic [COORD_W-1:0] MY_X = '0,
  parameter logic [COORD_W-1:0] MY_Y = '0,
  parameter int unsigned BE_DEPTH = 4,
  parameter int unsigned GS_DEPTH = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  flit_t             in_flit  [NPORTS],
  input  logic [NPORTS-1:0] in_valid,
  output logic [NPORTS-1:0] in_ready,
  output flit_t             out_flit [NPORTS],
  output logic [NPORTS-1:0] out_valid,
  input  logic [NPORTS-1:0] out_ready
);
  qentry_t           req_entry [NPORTS];
  logic [NPORTS-1:0] req_valid, in_fwd, sel_gs;
  logic [NPORTS-1:0] gnt [NPORTS];
  logic [NPORTS-1:0] xfer;
  flit_t             x_flit [NPORTS];
  logic [NPORTS-1:0] x_valid, om_ready;

  for (genvar i = 0; i < NPORTS; i++) begin : g_in
    input_module #(.MY_X(MY_X), .MY_Y(MY_Y), .BE_DEPTH(BE_DEPTH), .GS_DEPTH(GS_DEPTH)) u_im (
      .clk, .rst_n,
      .in_flit(in_flit[i]), .in_valid(in_valid[i]), .in_ready(in_ready[i]),
      .req_valid(req_valid[i]), .req_entry(req_entry[i]), .fwd(in_fwd[i]),
      .sel_gs(sel_gs[i])
    );
  end

  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    logic [NPORTS-1:0] req, req_head, req_tail;
    always_comb begin
      for (int i = 0; i < NPORTS; i++) begin
        req[i] = req_valid[i] && (req_entry[i].dest == port_e'(o));
        req_head[i] = req_entry[i].head;
        req_tail[i] = req_entry[i].tail;
      end
    end

    xbar_arbiter #(.N(NPORTS)) u_arb (
      .clk, .rst_n, .req, .req_head, .req_tail, .out_ready(om_ready[o]),
      .gnt(gnt[o]), .xfer(xfer[o])
    );

    output_module u_om (
      .clk, .rst_n,
      .in_flit(x_flit[o]), .in_valid(x_valid[o]), .in_ready(om_ready[o]),
      .out_flit(out_flit[o]), .out_valid(out_valid[o]), .out_ready(out_ready[o])
    );
  end

  xbar_fabric #(.N(NPORTS)) u_xbar (
    .in_entry(req_entry), .gnt, .out_ready(om_ready),
    .out_flit(x_flit), .out_valid(x_valid), .in_fwd
  );
endmodule
