// phase_detector: bang-bang (early/late) phase detector of the all-digital data recovery.
//
// Two of the eight PLL phases fall in each UI: the edge phase at the UI boundary and the
// data phase at mid-UI. For every UI the detector compares the previous data sample, the
// edge sample and the new data sample. If the data changed and the edge sample still shows
// the old value, the data transition came after the edge phase: the data is late and the
// delay line should shorten (dn). If the edge sample already shows the new value, the data
// is early (up). Without a transition there is no information. The data sample itself is
// the recovered bit (dbit, with dbit_stb one tick after the data phase).
// The decision rule is the usual one for a two-sample detector; the design description
// names the PD block only.
module phase_detector (
  input  logic clk,
  input  logic rst_n,
  input  logic din,
  input  logic edge_smp,
  input  logic data_smp,
  output logic up,
  output logic dn,
  output logic dbit,
  output logic dbit_stb
);
  logic e_q, d_prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_q <= 1'b0;
      d_prev <= 1'b0;
      dbit <= 1'b0;
      dbit_stb <= 1'b0;
      up <= 1'b0;
      dn <= 1'b0;
    end else begin
      up <= 1'b0;
      dn <= 1'b0;
      dbit_stb <= data_smp;
      if (edge_smp) e_q <= din;
      if (data_smp) begin
        dbit <= din;
        d_prev <= din;
        if (din != d_prev) begin
          if (e_q == d_prev) dn <= 1'b1;
          else up <= 1'b1;
        end
      end
    end
  end
endmodule
