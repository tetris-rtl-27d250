// controller_if: the controller interface of one player.
//
// The eight arcade buttons have pull-up resistors, so a pressed button reads
// 0. Button numbers: 0 Hold, 1 Spin L, 2 Spin R, 3 Hold, 4 Right,
// 5 Soft drop, 6 Left, 7 Hard drop (buttons 0 and 3 are the two Hold
// buttons and are OR-ed). Each action has an input_handler (synchronizer,
// 63-cycle validity filter, DAS). A global cooldown suppresses every input
// for COOLDOWN (15) cycles after any action pulse, so cross-talk arriving on
// another pin right after an input cannot register. Moves and rotations
// auto-repeat; hold and hard drop fire once per press (this design's choice).
// Output: one-cycle pulses in an actions_t, 3 + HOLD_MIN cycles after a
// clean press at the earliest.
module controller_if
  import tetris_pkg::*;
#(
  parameter int COOLDOWN   = 15,
  parameter int HOLD_MIN   = 63,
  parameter int DAS_CYCLES = 8_500_000,
  parameter int ARR_CYCLES = 2_500_000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] btn_n,
  output actions_t   act
);
  logic [7:0] pressed;
  logic [6:0] raw, fire;
  logic [$clog2(COOLDOWN+1)-1:0] cool;
  logic block;

  assign pressed = ~btn_n;
  // raw order matches actions_t: hold, rot_ccw, rot_cw, left, right, soft, hard
  assign raw = {pressed[0] | pressed[3], pressed[1], pressed[2], pressed[6],
                pressed[4], pressed[5], pressed[7]};
  assign block = (cool != 0);

  for (genvar i = 0; i < 7; i++) begin : g_btn
    localparam bit REP = (i != 6) && (i != 0);  // no repeat: hold, hard drop
    input_handler #(
      .HOLD_MIN(HOLD_MIN), .DAS_CYCLES(DAS_CYCLES), .ARR_CYCLES(ARR_CYCLES), .REPEAT(REP)
    ) u_ih (.clk, .rst_n, .raw(raw[i]), .block, .pulse(fire[i]));
  end

  // handlers that qualify in the same cycle all fire
  assign act = actions_t'(fire);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      cool <= '0;
    else if (fire != '0)
      cool <= ($clog2(COOLDOWN+1))'(COOLDOWN - 1);  // COOLDOWN quiet cycles
    else if (cool != 0)
      cool <= cool - 1'b1;
  end
endmodule
