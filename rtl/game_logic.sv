// game_logic: the Game Logic subsystem of one board.
//
// Wires the screen FSM (system_fsm), the in-game core (game_core), the
// seven-bag generator feeding the 6-piece preview queue, the garbage
// calculation for outgoing attacks, the pending queue for incoming garbage,
// the game clock and the line counters. Outgoing attacks appear on
// attack_valid/attack (every lock, value 0 when nothing is sent) and are
// counted as lines sent; incoming garbage from the network enters the
// pending queue. The visible 20 rows of the field (with the falling piece),
// the hold slot and the preview are brought out for the pixel drivers and
// the network packet. Button use on the menus: hard drop starts a sprint and
// leaves the end screens, hold enters battle mode.
module game_logic
  import tetris_pkg::*;
#(
  parameter int LOCK_CYCLES    = 25_000_000,
  parameter int GRAVITY_CYCLES = 50_000_000,
  parameter int GARBAGE_DELAY  = 50_000_000,
  parameter int CYC_PER_MS     = 50_000,
  parameter int SPRINT_LINES   = 40
) (
  input  logic        clk,
  input  logic        rst_n,
  input  actions_t    act,
  input  logic        net_start,
  input  logic        net_won,
  input  logic        opp_gbg_valid,
  input  logic [3:0]  opp_gbg,
  output sys_state_t  sys_state,
  output logic        game_start,
  output logic        mp_ready,
  output logic        lost,
  output vfield_t     vfield,
  output tile_t       hold_piece,
  output logic [5:0][3:0] preview,
  output logic [4:0]  hours,
  output logic [5:0]  minutes,
  output logic [5:0]  seconds,
  output logic [9:0]  millis,
  output logic [9:0]  lines_cleared,
  output logic [9:0]  lines_sent,
  output logic        attack_valid,
  output logic [3:0]  attack,
  output logic        applied,
  output logic        clr_valid,
  output clear_t      clr,
  output logic [3:0]  pending
);
  logic   in_game, topped_out, pop, head_valid, q_full, bag_valid;
  tile_t  head, bag_piece;
  logic   g_take;
  logic [3:0] g_ready;
  logic [30:0] rstate;
  logic   rbit;
  field_t disp_field;
  piece_t active;
  logic   hold_used, locked, playing;
  logic [4:0] combo;
  logic   in_combo, b2b;

  system_fsm #(.SPRINT_LINES(SPRINT_LINES)) u_sys (
    .clk, .rst_n,
    .sel_sprint(act.hard_drop), .sel_battle(act.hold), .confirm(act.hard_drop),
    .net_start, .net_won, .topped_out, .lines_cleared,
    .state(sys_state), .game_start, .in_game, .mp_ready, .lost
  );

  seven_bag u_bag (.clk, .rst_n, .ready(!q_full), .valid(bag_valid), .piece(bag_piece));

  piece_queue #(.DEPTH(6)) u_queue (
    .clk, .rst_n, .push(bag_valid), .push_piece(bag_piece), .full(q_full),
    .pop, .head, .head_valid, .preview
  );

  lfsr31 #(.SEED(31'h2545_F491)) u_gap_rng (.clk, .rst_n, .en(1'b1), .bit_out(rbit), .state(rstate));

  game_core #(
    .LOCK_CYCLES(LOCK_CYCLES), .MAX_RESETS(15), .GRAVITY_CYCLES(GRAVITY_CYCLES)
  ) u_core (
    .clk, .rst_n, .start(game_start), .stop(!in_game), .act,
    .next_piece(head), .next_valid(head_valid), .pop,
    .garbage_ready(g_ready), .garbage_take(g_take), .rand_col(rstate[7:4]),
    .disp_field, .active, .hold_piece, .hold_used,
    .clr_valid, .clr, .locked, .topped_out, .applied, .playing
  );

  garbage_calc u_gcalc (
    .clk, .rst_n, .clr_valid, .clr,
    .sent_valid(attack_valid), .sent(attack), .combo, .in_combo, .b2b
  );

  garbage_queue #(.MAX_LINES(12), .DELAY_CYCLES(GARBAGE_DELAY)) u_gqueue (
    .clk, .rst_n, .clear(game_start),
    .in_valid(opp_gbg_valid && sys_state == S_MP_MODE), .in_lines(opp_gbg),
    .take(g_take), .ready_lines(g_ready), .pending
  );

  game_timer #(.CYC_PER_MS(CYC_PER_MS)) u_timer (
    .clk, .rst_n, .clear(game_start), .run(in_game),
    .hours, .minutes, .seconds, .millis
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lines_cleared <= '0;
      lines_sent    <= '0;
    end else if (game_start) begin
      lines_cleared <= '0;
      lines_sent    <= '0;
    end else begin
      if (clr_valid)    lines_cleared <= lines_cleared + 10'(clr.lines);
      if (attack_valid) lines_sent    <= lines_sent + 10'(attack);
    end
  end

  always_comb
    for (int y = 0; y < VIS_ROWS; y++) vfield[y] = disp_field[y];

  logic unused;
  assign unused = ^{rbit, rstate[30:8], rstate[3:0], active, hold_used, locked, playing,
                    combo, in_combo, b2b, disp_field[ROWS-1:VIS_ROWS]};
endmodule
