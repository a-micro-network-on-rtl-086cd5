// output_module: output port of the switch with its handshaking unit.
//
// A two-entry buffer between the crossbar and the link to the next switch. Flits leave under
// a valid/ready handshake: out_flit is held stable while out_valid is high and out_ready is
// low, so the next switch can stall this one without loss, and a stall propagates back only
// through in_ready. in_ready depends on the buffer state only, never on out_ready in the same
// cycle, so no combinational path runs through a chain of switches; this is how this design
// reads the description's handshaking module that prevents deadlock loops. With both
// entries, one flit per cycle passes.
module output_module
  import mnoc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  flit_t in_flit,
  input  logic  in_valid,
  output logic  in_ready,
  output flit_t out_flit,
  output logic  out_valid,
  input  logic  out_ready
);
  flit_t buf_q [2];
  logic  rd_ptr, wr_ptr;
  logic [1:0] count;
  logic push, pop;

  assign in_ready = (count != 2'd2);
  assign out_valid = (count != 2'd0);
  assign out_flit = buf_q[rd_ptr];
  assign push = in_valid && in_ready;
  assign pop = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= 1'b0;
      wr_ptr <= 1'b0;
      count <= '0;
    end else begin
      if (push) wr_ptr <= !wr_ptr;
      if (pop) rd_ptr <= !rd_ptr;
      count <= count + 2'(push) - 2'(pop);
    end
  end

  always_ff @(posedge clk) if (push) buf_q[wr_ptr] <= in_flit;

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           out_valid && !out_ready |=> out_valid && $stable(out_flit));

endmodule
