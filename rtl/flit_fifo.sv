// flit_fifo: the BE queue and the GS queue of an input module.
//
// A synchronous FIFO of queue entries (flit plus head/tail marks and output direction).
// push is accepted when not full; the head entry is visible on rd_data whenever not_empty,
// and pop removes it. A push and a pop in the same cycle are both taken, so a queue of two
// entries already sustains one flit per cycle. Depth is a parameter; the design description
// names the queues but gives no depth (the BE queue defaults to 4, the GS queue to 2).
module flit_fifo
  import mnoc_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    push,
  input  qentry_t wr_data,
  output logic    full,
  input  logic    pop,
  output qentry_t rd_data,
  output logic    not_empty
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  qentry_t mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic [AW:0] count;

  assign full = (count == (AW+1)'(DEPTH));
  assign not_empty = (count != '0);
  assign rd_data = mem[rd_ptr];

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  logic do_push, do_pop;
  assign do_push = push && !full;
  assign do_pop = pop && not_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count <= '0;
    end else begin
      if (do_push) wr_ptr <= incr(wr_ptr);
      if (do_pop) rd_ptr <= incr(rd_ptr);
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= wr_data;
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) push |-> !full);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> not_empty);

endmodule
