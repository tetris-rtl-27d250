// game_core: the in-game state machine of one player.
//
// Holds the locked playfield, the falling piece and the hold slot, and runs
// the loop IDLE -> NEW_PIECE -> PIECE_FALLING -> PIECE_LOCK -> NEW_PIECE.
// A top-out (spawn overlap, lock entirely above the visible field, or
// garbage pushing blocks out of the top) returns it to IDLE, as does `stop`.
//
// Next states are precomputed. While a piece falls, three piece_checker
// instances run every cycle: one walks the five clockwise SRS kicks, one the
// five counter-clockwise kicks, and one walks left, right and down. After
// five cycles the first valid kick of each rotation and the validity of each
// shift are known (eval_done). Action pulses arriving meanwhile are kept
// pending and applied one per evaluation round, highest priority first:
// hold, hard drop, rotate cw, rotate ccw, left, right, soft drop, gravity.
// An action that is not possible is dropped. A hard drop moves the piece
// down one row per cycle until it rests, then locks it.
//
// Lock down uses move reset: a grounded piece locks after LOCK_CYCLES
// (0.5 s); each move or rotation of a grounded piece restarts the timer, and
// after MAX_RESETS (15) such resets the piece locks as soon as it is grounded.
// Hold swaps once per piece; the first hold takes the next piece from the
// queue. Locking writes the piece, clears full rows one check per cycle,
// reports the clear (lines, T-spin, mini, all clear) for one cycle on
// clr_valid, then inserts ready garbage lines one row per cycle, each group
// with one random gap column, before the next spawn.
//
// Following the design: the in-game FSM states, three checks per cycle with
// sequential kicks, spawn rows 20/21 (1-based), 0.5 s lock with 15 resets,
// hold once per piece. This design's own choices: gravity period, action
// priority, counting resets only while grounded, garbage entering between
// pieces.
module game_core
  import tetris_pkg::*;
#(
  parameter int LOCK_CYCLES    = 25_000_000,
  parameter int MAX_RESETS     = 15,
  parameter int GRAVITY_CYCLES = 50_000_000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,          // begin a game on an empty field
  input  logic       stop,           // abandon the game
  input  actions_t   act,
  input  tile_t      next_piece,     // head of the preview queue
  input  logic       next_valid,
  output logic       pop,            // head taken
  input  logic [3:0] garbage_ready,  // lines in the ready pending-garbage entry
  output logic       garbage_take,   // that entry taken
  input  logic [3:0] rand_col,
  output field_t     disp_field,     // locked field with the falling piece
  output piece_t     active,
  output tile_t      hold_piece,
  output logic       hold_used,
  output logic       clr_valid,
  output clear_t     clr,
  output logic       locked,         // pulse: a piece locked
  output logic       topped_out,     // pulse
  output logic       applied,        // pulse: a player action changed the piece
  output logic       playing
);

  typedef enum logic [1:0] {IDLE, NEW_PIECE, PIECE_FALLING, PIECE_LOCK} ig_state_t;
  typedef enum logic [1:0] {LK_WRITE, LK_CLEAR, LK_REPORT, LK_GARBAGE} lk_phase_t;

  localparam int LW = $clog2(LOCK_CYCLES + 1);
  localparam int GW = $clog2(GRAVITY_CYCLES + 1);

  ig_state_t state;
  lk_phase_t phase;
  field_t    field;
  piece_t    cur;

  // evaluation of the next states
  logic [2:0] eval_k;
  logic       eval_done;
  logic       cw_found, ccw_found, left_ok, right_ok, down_ok;
  piece_t     cw_res, ccw_res;
  logic [2:0] cw_kick, ccw_kick;

  actions_t   pend;
  logic       pend_grav;
  logic       hard;          // hard drop in progress
  logic       from_hold;     // next spawn is the swapped-out hold piece
  tile_t      swap_kind;
  logic       last_rot;
  logic [2:0] last_kick;
  logic [LW-1:0] lock_cnt;
  logic [4:0] resets;
  logic [GW-1:0] grav_cnt;
  logic [4:0] row;
  logic [2:0] lines;
  logic       ts_q, mini_q;
  logic [3:0] g_left;
  logic [3:0] gap;

  // ---------------------------------------------------------------- checks
  piece_t cand_cw, cand_ccw, cand_mv, spawn_p;
  logic   ok_cw, ok_ccw, ok_mv;
  logic [5:0] k_cw, k_ccw;

  always_comb begin
    k_cw  = kick(cur.kind, cur.rot, 1'b1, eval_k);
    k_ccw = kick(cur.kind, cur.rot, 1'b0, eval_k);
    cand_cw      = cur;
    cand_cw.rot  = cur.rot + 2'd1;
    cand_cw.x    = cur.x + 6'(signed'(k_cw[5:3]));
    cand_cw.y    = cur.y + 7'(signed'(k_cw[2:0]));
    cand_ccw     = cur;
    cand_ccw.rot = cur.rot - 2'd1;
    cand_ccw.x   = cur.x + 6'(signed'(k_ccw[5:3]));
    cand_ccw.y   = cur.y + 7'(signed'(k_ccw[2:0]));
    spawn_p      = spawn_piece(from_hold ? swap_kind : next_piece);
    cand_mv      = cur;
    if (state == NEW_PIECE)
      cand_mv = spawn_p;
    else if (hard || eval_k >= 3'd2)
      cand_mv.y = cur.y - 7'sd1;
    else if (eval_k == 3'd0)
      cand_mv.x = cur.x - 6'sd1;
    else
      cand_mv.x = cur.x + 6'sd1;
  end

  piece_checker u_chk_cw  (.field(field), .cand(cand_cw),  .ok(ok_cw));
  piece_checker u_chk_ccw (.field(field), .cand(cand_ccw), .ok(ok_ccw));
  piece_checker u_chk_mv  (.field(field), .cand(cand_mv),  .ok(ok_mv));

  logic ts_now, mini_now;
  tspin_detect u_tspin (
    .field(field), .piece(cur), .last_rot(last_rot), .last_kick(last_kick),
    .tspin(ts_now), .mini(mini_now)
  );

  // -------------------------------------------------------- field helpers
  function automatic field_t write_piece(field_t f, piece_t p);
    logic [3:0] m;
    logic signed [7:0] cx, cy;
    for (int i = 0; i < 4; i++) begin
      m  = mino(p.kind, p.rot, 2'(i));
      cx = 8'(p.x) + 8'(m[3:2]);
      cy = 8'(p.y) + 8'(m[1:0]);
      if (cx >= 0 && cx < 8'(COLS) && cy >= 0 && cy < 8'(ROWS))
        f[cy[4:0]][cx[3:0]] = p.kind;
    end
    return f;
  endfunction

  function automatic logic row_full(row_t r);
    for (int x = 0; x < COLS; x++)
      if (r[x] == T_EMPTY) return 1'b0;
    return 1'b1;
  endfunction

  function automatic logic lock_out(piece_t p);
    logic [3:0] m;
    for (int i = 0; i < 4; i++) begin
      m = mino(p.kind, p.rot, 2'(i));
      if (8'(p.y) + 8'(m[1:0]) < 8'(VIS_ROWS)) return 1'b0;
    end
    return 1'b1;
  endfunction

  always_comb begin
    disp_field = field;
    if (state == PIECE_FALLING)
      disp_field = write_piece(field, cur);
  end

  assign active     = cur;
  assign playing    = (state != IDLE);
  assign pop        = (state == NEW_PIECE) && !from_hold && next_valid;

  // gap column from the random input, reduced to 0..COLS-1
  logic [3:0] rand_gap;
  assign rand_gap = (rand_col >= 4'(COLS)) ? rand_col - 4'(COLS) : rand_col;

  // ------------------------------------------------------------ main FSM
  actions_t incoming;
  assign incoming = act;

  logic grounded;
  assign grounded = eval_done && !down_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      phase <= LK_WRITE;
      field <= '0;
      cur <= '0;
      eval_k <= '0;
      eval_done <= 1'b0;
      {cw_found, ccw_found, left_ok, right_ok, down_ok} <= '0;
      cw_res <= '0;
      ccw_res <= '0;
      cw_kick <= '0;
      ccw_kick <= '0;
      pend <= '0;
      pend_grav <= 1'b0;
      hard <= 1'b0;
      from_hold <= 1'b0;
      swap_kind <= T_EMPTY;
      hold_piece <= T_EMPTY;
      hold_used <= 1'b0;
      last_rot <= 1'b0;
      last_kick <= '0;
      lock_cnt <= '0;
      resets <= '0;
      grav_cnt <= '0;
      row <= '0;
      lines <= '0;
      ts_q <= 1'b0;
      mini_q <= 1'b0;
      g_left <= '0;
      gap <= '0;
      clr_valid <= 1'b0;
      clr <= '0;
      locked <= 1'b0;
      topped_out <= 1'b0;
      applied <= 1'b0;
      garbage_take <= 1'b0;
    end else begin
      clr_valid    <= 1'b0;
      locked       <= 1'b0;
      topped_out   <= 1'b0;
      applied      <= 1'b0;
      garbage_take <= 1'b0;

      if (stop) begin
        state <= IDLE;
        hard  <= 1'b0;
      end else begin
        unique case (state)
          // --------------------------------------------------------------
          IDLE: begin
            pend <= '0;
            if (start) begin
              field      <= '0;
              hold_piece <= T_EMPTY;
              hold_used  <= 1'b0;
              from_hold  <= 1'b0;
              state      <= NEW_PIECE;
            end
          end
          // --------------------------------------------------------------
          NEW_PIECE: begin
            pend <= pend | incoming;
            if (from_hold || next_valid) begin
              from_hold <= 1'b0;
              if (ok_mv) begin
                cur       <= spawn_p;
                state     <= PIECE_FALLING;
                eval_k    <= '0;
                eval_done <= 1'b0;
                {cw_found, ccw_found} <= 2'b00;
                lock_cnt  <= '0;
                resets    <= '0;
                grav_cnt  <= '0;
                pend_grav <= 1'b0;
                last_rot  <= 1'b0;
                hard      <= 1'b0;
              end else begin
                topped_out <= 1'b1;   // block out
                state      <= IDLE;
              end
            end
          end
          // --------------------------------------------------------------
          PIECE_FALLING: begin
            actions_t p;
            logic     moved, user, is_down, restart, acted;
            p = pend | incoming;
            moved = 1'b0;
            user = 1'b0;
            is_down = 1'b0;
            restart = 1'b0;
            acted = 1'b0;

            // gravity
            if (grav_cnt >= GW'(GRAVITY_CYCLES - 1)) begin
              grav_cnt  <= '0;
              pend_grav <= 1'b1;
            end else begin
              grav_cnt <= grav_cnt + 1'b1;
            end

            if (hard) begin
              // hard drop: one row per cycle, then lock
              if (ok_mv) begin
                cur.y <= cur.y - 7'sd1;
                last_rot <= 1'b0;
              end else begin
                hard  <= 1'b0;
                state <= PIECE_LOCK;
                phase <= LK_WRITE;
              end
              pend <= '0;
            end else if (!eval_done) begin
              // sequential search: kick eval_k for both rotations, shift eval_k
              if (ok_cw && !cw_found) begin
                cw_found <= 1'b1;
                cw_res   <= cand_cw;
                cw_kick  <= eval_k;
              end
              if (ok_ccw && !ccw_found) begin
                ccw_found <= 1'b1;
                ccw_res   <= cand_ccw;
                ccw_kick  <= eval_k;
              end
              case (eval_k)
                3'd0: left_ok  <= ok_mv;
                3'd1: right_ok <= ok_mv;
                3'd2: down_ok  <= ok_mv;
                default: ;
              endcase
              if (eval_k == 3'd4) eval_done <= 1'b1;
              eval_k <= eval_k + 3'd1;
              pend <= p;
            end else begin
              // evaluation complete: apply one pending action
              if (p.hold) begin
                p.hold = 1'b0;
                if (!hold_used) begin
                  hold_used  <= 1'b1;
                  hold_piece <= cur.kind;
                  if (hold_piece != T_EMPTY) begin
                    from_hold <= 1'b1;
                    swap_kind <= hold_piece;
                  end
                  state   <= NEW_PIECE;
                  applied <= 1'b1;
                  acted = 1'b1;
                end
              end else if (p.hard_drop) begin
                p.hard_drop = 1'b0;
                hard    <= 1'b1;
                applied <= 1'b1;
                acted = 1'b1;
              end else if (p.rot_cw) begin
                p.rot_cw = 1'b0;
                if (cw_found) begin
                  cur <= cw_res;
                  last_rot  <= 1'b1;
                  last_kick <= cw_kick;
                  moved = 1'b1;
                  user = 1'b1;
                end
              end else if (p.rot_ccw) begin
                p.rot_ccw = 1'b0;
                if (ccw_found) begin
                  cur <= ccw_res;
                  last_rot  <= 1'b1;
                  last_kick <= ccw_kick;
                  moved = 1'b1;
                  user = 1'b1;
                end
              end else if (p.left) begin
                p.left = 1'b0;
                if (left_ok) begin
                  cur.x <= cur.x - 6'sd1;
                  last_rot <= 1'b0;
                  moved = 1'b1;
                  user = 1'b1;
                end
              end else if (p.right) begin
                p.right = 1'b0;
                if (right_ok) begin
                  cur.x <= cur.x + 6'sd1;
                  last_rot <= 1'b0;
                  moved = 1'b1;
                  user = 1'b1;
                end
              end else if (p.soft_drop || pend_grav) begin
                user = p.soft_drop;
                p.soft_drop = 1'b0;
                pend_grav <= 1'b0;
                if (down_ok) begin
                  cur.y <= cur.y - 7'sd1;
                  last_rot <= 1'b0;
                  moved = 1'b1;
                  is_down = 1'b1;
                end
              end
              pend <= p;

              if (moved) begin
                restart = 1'b1;
                if (user) applied <= 1'b1;
                if (is_down) begin
                  lock_cnt <= '0;
                end else if (!down_ok) begin
                  // move reset while grounded
                  lock_cnt <= '0;
                  if (resets < 5'(MAX_RESETS)) resets <= resets + 5'd1;
                end
              end else if (grounded && !acted) begin
                if (resets >= 5'(MAX_RESETS) || lock_cnt >= LW'(LOCK_CYCLES - 1)) begin
                  state <= PIECE_LOCK;
                  phase <= LK_WRITE;
                end else begin
                  lock_cnt <= lock_cnt + 1'b1;
                end
              end
              if (restart) begin
                eval_k    <= '0;
                eval_done <= 1'b0;
                {cw_found, ccw_found} <= 2'b00;
              end
            end
          end
          // --------------------------------------------------------------
          PIECE_LOCK: begin
            pend <= pend | incoming;
            unique case (phase)
              LK_WRITE: begin
                field     <= write_piece(field, cur);
                ts_q      <= ts_now;
                mini_q    <= mini_now;
                hold_used <= 1'b0;
                locked    <= 1'b1;
                row       <= '0;
                lines     <= '0;
                if (lock_out(cur)) begin
                  topped_out <= 1'b1;
                  state      <= IDLE;
                end else begin
                  phase <= LK_CLEAR;
                end
              end
              LK_CLEAR: begin
                if (row == 5'(ROWS)) begin
                  phase <= LK_REPORT;
                end else if (row_full(field[row])) begin
                  for (int y = 0; y < ROWS; y++)
                    if (y >= int'(row))
                      field[y] <= (y == ROWS - 1) ? '0 : field[y+1];
                  lines <= lines + 3'd1;
                end else begin
                  row <= row + 5'd1;
                end
              end
              LK_REPORT: begin
                clr_valid     <= 1'b1;
                clr.lines     <= lines;
                clr.tspin     <= ts_q;
                clr.mini      <= mini_q;
                clr.all_clear <= (lines != 0) && (field == '0);
                phase  <= LK_GARBAGE;
                g_left <= '0;
              end
              default: begin  // LK_GARBAGE
                if (g_left != 0) begin
                  if (field[ROWS-1] != '0) begin
                    topped_out <= 1'b1;   // pushed out of the top
                    state      <= IDLE;
                  end else begin
                    for (int y = ROWS - 1; y > 0; y--)
                      field[y] <= field[y-1];
                    for (int x = 0; x < COLS; x++)
                      field[0][x] <= (4'(x) == gap) ? T_EMPTY : T_GARBAGE;
                    g_left <= g_left - 4'd1;
                  end
                end else if (garbage_ready != 0 && !garbage_take) begin
                  g_left       <= garbage_ready;
                  gap          <= rand_gap;
                  garbage_take <= 1'b1;
                end else if (!garbage_take) begin
                  state <= NEW_PIECE;
                end
              end
            endcase
          end
          default: state <= IDLE;
        endcase
      end
    end
  end

endmodule
