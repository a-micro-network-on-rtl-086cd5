// cdr_ctrl: CC & FSM block of the receiver: programmable digital loop filter and
// phase-control FSM that set the delay-line code.
//
// The loop filter counts the early (up) and late (dn) decisions of the phase detector in a
// signed accumulator; when it reaches +threshold or -threshold the delay code moves one
// step that way and the accumulator restarts. The FSM has two states. ACQUIRE uses a
// threshold of 1 for fast pull-in. When the code has reversed direction LOCK_REV times the
// loop is dithering around the lock point: the FSM enters TRACK, raises locked and uses the
// programmable threshold track_th, which sets the loop bandwidth. The code saturates at
// 0 and at its maximum. The description gives the block's parts (programmable loop filter,
// phase-control FSM) but not their rules; these are this design's own.
module cdr_ctrl #(
  parameter int unsigned CODE_W = 4,
  parameter int unsigned CODE_INIT = 8,
  parameter int unsigned LOCK_REV = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              up,
  input  logic              dn,
  input  logic [3:0]        track_th,
  output logic [CODE_W-1:0] code,
  output logic              locked
);
  typedef enum logic {S_ACQUIRE, S_TRACK} state_e;
  state_e state;

  logic signed [5:0] acc, acc_n;
  logic [3:0] rev_cnt;
  logic last_dir;            // 1: last step was up
  logic moved;               // a step has been taken since reset
  logic [4:0] th;
  logic step_up, step_dn;

  always_comb begin
    th = (state == S_ACQUIRE || track_th == '0) ? 5'd1 : {1'b0, track_th};
    acc_n = acc + 6'(signed'({1'b0, up})) - 6'(signed'({1'b0, dn}));
    step_up = (acc_n >= signed'({1'b0, th}));
    step_dn = (acc_n <= -signed'({1'b0, th}));
  end

  assign locked = (state == S_TRACK);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_ACQUIRE;
      acc <= '0;
      code <= CODE_W'(CODE_INIT);
      rev_cnt <= '0;
      last_dir <= 1'b0;
      moved <= 1'b0;
    end else if (up || dn) begin
      if (step_up || step_dn) begin
        acc <= '0;
        if (step_up && code != '1) code <= code + 1'b1;
        if (step_dn && code != '0) code <= code - 1'b1;
        last_dir <= step_up;
        moved <= 1'b1;
        if (moved && step_up != last_dir && state == S_ACQUIRE) begin
          if (rev_cnt == 4'(LOCK_REV - 1)) state <= S_TRACK;
          rev_cnt <= rev_cnt + 1'b1;
        end
      end else begin
        acc <= acc_n;
      end
    end
  end
endmodule
