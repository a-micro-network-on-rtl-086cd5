// dcdl: behavioural model of the pre-amplifier and digitally controlled delay line (the
// deskew buffer of the receiver).
//
// The real part is a chain of digital delay cells in front of the sampler; its delay is
// chosen by the code from the CC & FSM block. This model delays the serial input by `code`+1
// ticks of the fast clock (12.5 ps steps, two UI of range with the default 16 taps), using a
// tapped shift register. The pre-amplifier is reduced to passing the logic level. It is a
// model of the delay, not a circuit to synthesize as a delay line.
module dcdl #(
  parameter int unsigned TAPS = 16
) (
  input  logic                    clk_os,
  input  logic                    rst_n,
  input  logic                    din,
  input  logic [$clog2(TAPS)-1:0] code,
  output logic                    dout
);
  logic [TAPS-1:0] line;
  always_ff @(posedge clk_os or negedge rst_n) begin
    if (!rst_n) line <= '0;
    else line <= {line[TAPS-2:0], din};
  end
  // code 0: one tick (the input register); code k: k+1 ticks
  assign dout = line[code];
endmodule
