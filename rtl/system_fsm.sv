// system_fsm: which screen the player is on.
//
// START_SCREEN -> SPRINT_MODE on the sprint button (hard drop), or
// -> MP_READY on the battle button (hold). MP_READY waits until the network
// reports that both boards are ready (net_start) and then enters MP_MODE.
// A sprint is won after SPRINT_LINES (40) cleared lines and lost on a
// top-out; a battle is lost on a top-out and won when the network reports
// that the opponent topped out (net_won). From either end screen the
// confirm button (hard drop) returns to START_SCREEN. game_start pulses when
// a game begins; in_game is high in SPRINT_MODE and MP_MODE. The states and
// outcomes are the design's; which buttons select what is this design's
// choice.
module system_fsm
  import tetris_pkg::*;
#(
  parameter int SPRINT_LINES = 40
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sel_sprint,
  input  logic       sel_battle,
  input  logic       confirm,
  input  logic       net_start,
  input  logic       net_won,
  input  logic       topped_out,
  input  logic [9:0] lines_cleared,
  output sys_state_t state,
  output logic       game_start,
  output logic       in_game,
  output logic       mp_ready,
  output logic       lost
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_START_SCREEN;
      game_start <= 1'b0;
    end else begin
      game_start <= 1'b0;
      unique case (state)
        S_START_SCREEN:
          if (sel_sprint) begin
            state      <= S_SPRINT_MODE;
            game_start <= 1'b1;
          end else if (sel_battle) begin
            state <= S_MP_READY;
          end
        S_MP_READY:
          if (net_start) begin
            state      <= S_MP_MODE;
            game_start <= 1'b1;
          end
        S_SPRINT_MODE:
          if (topped_out)
            state <= S_GAME_LOST;
          else if (lines_cleared >= 10'(SPRINT_LINES))
            state <= S_GAME_WON;
        S_MP_MODE:
          if (topped_out)
            state <= S_GAME_LOST;
          else if (net_won)
            state <= S_GAME_WON;
        S_GAME_WON, S_GAME_LOST:
          if (confirm) state <= S_START_SCREEN;
        default: state <= S_START_SCREEN;
      endcase
    end
  end

  assign in_game  = (state == S_SPRINT_MODE) || (state == S_MP_MODE);
  assign mp_ready = (state == S_MP_READY);
  assign lost     = (state == S_GAME_LOST);
endmodule
