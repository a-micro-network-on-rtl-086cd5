// xbar_fabric: the 5x5 crossbar fabric of the switch.
//
// Each output takes the flit of the input its arbiter granted (an AND-OR multiplexer on
// the one-hot grant row), and each input learns whether its flit was taken this cycle
// (in_fwd), which pops it from its queue. Purely combinational.
module xbar_fabric
  import mnoc_pkg::*;
#(
  parameter int unsigned N = NPORTS
) (
  input  qentry_t      in_entry [N],
  input  logic [N-1:0] gnt [N],       // gnt[out][in]
  input  logic [N-1:0] out_ready,
  output flit_t        out_flit [N],
  output logic [N-1:0] out_valid,
  output logic [N-1:0] in_fwd
);
  always_comb begin
    in_fwd = '0;
    for (int o = 0; o < N; o++) begin
      out_flit[o] = '0;
      out_valid[o] = 1'b0;
      for (int i = 0; i < N; i++) begin
        if (gnt[o][i]) begin
          out_flit[o] = out_flit[o] | in_entry[i].flit;
          out_valid[o] = 1'b1;
          if (out_ready[o]) in_fwd[i] = 1'b1;
        end
      end
    end
  end
endmodule
