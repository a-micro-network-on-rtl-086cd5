// input_module: one input port of the switch, as drawn in the design description.
//
// input_controller (header parsing, routing, DeMUX) -> BE queue and GS queue -> vc_arbiter
// (GS before BE, plus the MUX) -> request to the crossbar. The head entry offered to the
// crossbar carries its output direction and head/tail marks; fwd (from the crossbar) pops it.
// A flit accepted at the input can be offered to the crossbar in the next cycle.
module input_module
  import mnoc_pkg::*;
#(
  parameter logic [COORD_W-1:0] MY_X = '0,
  parameter logic [COORD_W-1:0] MY_Y = '0,
  parameter int unsigned BE_DEPTH = 4,
  parameter int unsigned GS_DEPTH = 2
) (
  input  logic    clk,
  input  logic    rst_n,
  input  flit_t   in_flit,
  input  logic    in_valid,
  output logic    in_ready,
  output logic    req_valid,
  output qentry_t req_entry,
  input  logic    fwd,
  output logic    sel_gs
);
  qentry_t q_data, be_head, gs_head;
  logic be_push, gs_push, be_full, gs_full, be_valid, gs_valid, be_pop, gs_pop;

  input_controller #(.MY_X(MY_X), .MY_Y(MY_Y)) u_ctrl (
    .clk, .rst_n, .in_flit, .in_valid, .in_ready,
    .be_push, .gs_push, .q_data, .be_full, .gs_full
  );

  flit_fifo #(.DEPTH(BE_DEPTH)) u_be_q (
    .clk, .rst_n, .push(be_push), .wr_data(q_data), .full(be_full),
    .pop(be_pop), .rd_data(be_head), .not_empty(be_valid)
  );

  flit_fifo #(.DEPTH(GS_DEPTH)) u_gs_q (
    .clk, .rst_n, .push(gs_push), .wr_data(q_data), .full(gs_full),
    .pop(gs_pop), .rd_data(gs_head), .not_empty(gs_valid)
  );

  vc_arbiter u_vc (
    .clk, .rst_n, .be_head, .be_valid, .be_pop, .gs_head, .gs_valid, .gs_pop,
    .req_valid, .req_entry, .fwd, .sel_gs
  );
endmodule
