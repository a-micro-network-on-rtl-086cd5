// mux_controller: decodes the 3-bit test-mode select into the selects of the three test
// multiplexers of the chip: the source of the transceiver (1-to-32 SR or upper switch),
// the source of the lower switch (upper switch, PG, raw receiver, byte aligner) and the
// source of the data output pin (that same multiplexer, bypassing the lower switch, or the
// lower switch). Combinational. The eight modes and their encoding are listed in link_pkg;
// the description gives their number and three of their kinds.
module mux_controller
  import link_pkg::*;
(
  input  test_mode_e mode,
  output logic       tx_from_switch,  // 1: transceiver sends the upper switch east output
  output lower_src_e lower_src,
  output logic       out_from_switch  // 1: data out pin shows the lower switch east output
);
  always_comb begin
    tx_from_switch = 1'b1;
    lower_src = L_UPPER;
    out_from_switch = 1'b0;
    unique case (mode)
      M_SW_UPPER:  lower_src = L_UPPER;
      M_SW_LOWER:  begin lower_src = L_PG; out_from_switch = 1'b1; end
      M_SW_CHAIN:  begin lower_src = L_UPPER; out_from_switch = 1'b1; end
      M_TRX_RAW:   begin tx_from_switch = 1'b0; lower_src = L_RAW; end
      M_LINK_RAW:  lower_src = L_RAW;
      M_LINK_BA:   lower_src = L_BA;
      M_LINK_FULL: begin lower_src = L_BA; out_from_switch = 1'b1; end
      M_PG_ONLY:   lower_src = L_PG;
      default:     ;
    endcase
  end
endmodule
