// net_control: game start / game end synchronization of the two boards.
//
// States IDLE, GAME_READY, IN_GAME, GAME_LOST, GAME_LOST_TO, GAME_WON.
//   IDLE          -> GAME_READY when the player enters battle mode (mp_ready)
//   GAME_READY    sends ACKs continuously and listens; an ACK from the other
//                 board starts the game (game_start pulse) -> IN_GAME.
//                 Leaving battle mode returns to IDLE.
//   IN_GAME       a local top-out (lost) -> GAME_LOST; a game-end packet
//                 from the other board -> GAME_WON (game_won pulse)
//   GAME_LOST     sends game-end packets continuously until an ACK arrives
//                 -> GAME_LOST_TO
//   GAME_LOST_TO  keeps sending game-end packets for TO_BITS bit times, to
//                 cover ACKs that were already in flight -> IDLE
//   GAME_WON      sends ACKs for TO_BITS bit times -> IDLE
// hs_mode tells the handshake sender what to stream (0 none, 1 ACK, 2 GE).
// States and transitions follow the protocol description; TO_BITS is this
// design's choice.
module net_control #(
  parameter int TO_BITS = 200
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tick,
  input  logic       mp_ready,
  input  logic       lost,
  input  logic       ack_valid,
  input  logic       ge_valid,
  output logic [1:0] hs_mode,
  output logic       game_start,
  output logic       game_won,
  output logic       in_game,
  output logic [2:0] state
);
  typedef enum logic [2:0] {
    NC_IDLE, NC_GAME_READY, NC_IN_GAME, NC_GAME_LOST, NC_GAME_LOST_TO, NC_GAME_WON
  } nc_state_t;
  nc_state_t st;
  localparam int TW = $clog2(TO_BITS + 1);
  logic [TW-1:0] to;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= NC_IDLE; to <= '0; game_start <= 1'b0; game_won <= 1'b0;
    end else begin
      game_start <= 1'b0;
      game_won   <= 1'b0;
      unique case (st)
        NC_IDLE:
          if (mp_ready) st <= NC_GAME_READY;
        NC_GAME_READY:
          if (!mp_ready) st <= NC_IDLE;
          else if (ack_valid) begin
            st         <= NC_IN_GAME;
            game_start <= 1'b1;
          end
        NC_IN_GAME:
          if (lost) st <= NC_GAME_LOST;
          else if (ge_valid) begin
            st       <= NC_GAME_WON;
            game_won <= 1'b1;
            to       <= '0;
          end
        NC_GAME_LOST:
          if (ack_valid) begin
            st <= NC_GAME_LOST_TO;
            to <= '0;
          end
        NC_GAME_LOST_TO, NC_GAME_WON:
          if (tick) begin
            if (to == TW'(TO_BITS - 1)) st <= NC_IDLE;
            else to <= to + 1'b1;
          end
        default: st <= NC_IDLE;
      endcase
    end
  end

  always_comb
    case (st)
      NC_GAME_READY, NC_GAME_WON:     hs_mode = 2'd1;
      NC_GAME_LOST, NC_GAME_LOST_TO:  hs_mode = 2'd2;
      default:                        hs_mode = 2'd0;
    endcase

  assign in_game = (st == NC_IN_GAME);
  assign state   = st;
endmodule
