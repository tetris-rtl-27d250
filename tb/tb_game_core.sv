// tb_game_core: self-checking testbench for game_core.
// Lock delay and gravity are scaled down (200 and 1000 cycles). Directed
// games check against hand-worked fields: spawn positions, shifting to the
// wall, rotation, hard drop landing, hold (first hold takes the next piece,
// a second hold in the same piece is refused, a later hold swaps), a single
// line clear followed by an all clear, garbage insertion with its gap, a
// triple and a tetris, the 0.5 s lock delay (scaled), the 15 move-reset
// limit, and top-out. A long random game then checks invariants at every
// lock: no overlap (each lock adds exactly four cells), cleared rows are
// really gone (cells drop by ten per line), garbage adds nine cells per
// row, and the action latency (pulse to `applied`) stays within 8 cycles.
// A directed mini T-spin single (T kicked into a slot at the wall) must be
// reported with its line, T-spin and mini flags.
module tb_game_core;
  import tetris_pkg::*;
  localparam int LOCK = 200, GRAV = 1000;
  logic clk = 0, rst_n = 0, start = 0, stop = 0, next_valid = 1, pop;
  actions_t act = '0;
  tile_t next_piece;
  logic [3:0] garbage_ready = 0, rand_col = 0;
  logic garbage_take, hold_used, clr_valid, locked, topped_out, applied, playing;
  field_t disp_field;
  piece_t active;
  tile_t hold_piece;
  clear_t clr;
  int checks = 0, failures = 0;
  tile_t seq[$];
  longint cyc = 0;
  int n_locked = 0, n_clr = 0, n_top = 0, n_take = 0, n_tspin = 0, n_lines = 0, worst_lat = 0;
  clear_t last_clr;
  bit one_shot = 1;

  game_core #(.LOCK_CYCLES(LOCK), .MAX_RESETS(15), .GRAVITY_CYCLES(GRAV)) dut (
    .clk, .rst_n, .start, .stop, .act, .next_piece, .next_valid, .pop, .garbage_ready, .garbage_take,
    .rand_col, .disp_field, .active, .hold_piece, .hold_used, .clr_valid, .clr, .locked, .topped_out,
    .applied, .playing);

  always #5 clk = ~clk;
  assign next_piece = (seq.size() != 0) ? seq[0] : T_T;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && pop && seq.size() != 0) void'(seq.pop_front());
    if (rst_n && locked) n_locked++;
    if (rst_n && clr_valid) begin n_clr++; last_clr = clr; n_lines += clr.lines; if (clr.tspin) n_tspin++; end
    if (rst_n && topped_out) n_top++;
    if (rst_n && garbage_take) n_take++;
    if (rst_n && garbage_take && one_shot) garbage_ready <= 0;   // queue entry consumed
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cyc, what); end
  endtask

  function automatic int cells();
    int n = 0;
    for (int y = 0; y < ROWS; y++) for (int x = 0; x < COLS; x++) if (disp_field[y][x] != 0) n++;
    return n;
  endfunction

  // one action pulse, then wait until it took effect (or was refused)
  task automatic press(input int a);
    @(negedge clk);
    act = '0;
    act[a] = 1'b1;
    @(negedge clk);
    act = '0;
    repeat (10) @(negedge clk);
  endtask
  localparam int HARD = 0, SOFT = 1, RIGHT = 2, LEFT = 3, CW = 4, CCW = 5, HOLD = 6;

  task automatic new_game(input tile_t s[$]);
    @(negedge clk); stop = 1;
    @(negedge clk); stop = 0;
    seq = s;
    start = 1;
    @(negedge clk); start = 0;
    repeat (10) @(negedge clk);
  endtask

  task automatic drop_and_settle();
    int n0 = n_locked;
    press(HARD);
    while (n_locked == n0) @(negedge clk);
    repeat (60) @(negedge clk);
  endtask

  function automatic bit is(int x, int y, int k);
    return disp_field[y][x] == 4'(k);
  endfunction

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    check(!playing, "idle after reset");

    // ---- spawn, shift, rotate, hard drop, hold
    new_game('{T_T, T_I, T_O, T_S, T_Z, T_J, T_L});
    check(playing && active.kind == T_T && active.x == 3 && active.y == 18 && active.rot == 0, "T spawn");
    check(is(4, 20, T_T) && is(3, 19, T_T) && is(5, 19, T_T), "T spawns in rows 20-21 (1-based)");
    repeat (4) press(LEFT);
    check(active.x == 0, "shifted to the left wall and stopped");
    press(CW);
    check(active.rot == 1 && active.x == 0 && active.y == 18, "rotated clockwise without kick");
    drop_and_settle();
    check(is(1, 0, T_T) && is(1, 1, T_T) && is(1, 2, T_T) && is(2, 1, T_T), "T landed on the floor");
    check(active.kind == T_I && active.x == 3 && active.y == 17, "I spawn");
    press(HOLD);
    check(hold_piece == T_I && active.kind == T_O && active.x == 4 && active.y == 19, "first hold takes the next piece");
    press(HOLD);
    check(hold_piece == T_I && active.kind == T_O, "second hold in one piece refused");
    drop_and_settle();
    check(is(4, 0, T_O) && is(5, 1, T_O), "O landed");
    check(active.kind == T_S && !hold_used, "hold available again");
    press(HOLD);
    check(active.kind == T_I && hold_piece == T_S, "hold swaps");

    // ---- single line clear, then all clear
    new_game('{T_I, T_I, T_O, T_I, T_I});
    repeat (3) press(LEFT);
    drop_and_settle();
    press(RIGHT);
    drop_and_settle();
    repeat (4) press(RIGHT);
    drop_and_settle();
    check(last_clr.lines == 1 && !last_clr.all_clear && cells() == 2 + 4, "single clear");
    repeat (3) press(LEFT);
    drop_and_settle();
    press(RIGHT);
    drop_and_settle();
    check(last_clr.lines == 1 && last_clr.all_clear, "all clear");
    check(disp_field[0] == '0 || cells() == 4, "field empty apart from the new piece");

    // ---- garbage with gap, triple
    new_game('{T_I, T_I, T_O, T_I});
    garbage_ready = 3; rand_col = 0;
    begin
      int t0;
      t0 = n_take;
      drop_and_settle();
      garbage_ready = 0;
      check(n_take == t0 + 1, "garbage taken once");
    end
    check(disp_field[0][0] == 0 && disp_field[1][0] == 0 && disp_field[2][0] == 0, "gap column");
    check(disp_field[0][9] == T_GARBAGE && disp_field[2][1] == T_GARBAGE, "garbage rows");
    check(is(3, 3, T_I) && is(6, 3, T_I), "stack pushed up by three rows");
    press(CW);
    repeat (5) press(LEFT);
    check(active.rot == 1 && active.x == -2, "vertical I at the wall");
    drop_and_settle();
    check(last_clr.lines == 3, "triple");
    check(is(0, 0, T_I) && is(3, 0, T_I) && cells() == 5 + 4, "field after the triple");

    // ---- tetris
    new_game('{T_O, T_I, T_T});
    repeat (4) press(RIGHT);
    garbage_ready = 4; rand_col = 10;   // reduced to column 0
    drop_and_settle();
    garbage_ready = 0;
    check(is(8, 4, T_O) && disp_field[0][0] == 0, "O above four garbage rows");
    press(CW);
    repeat (5) press(LEFT);
    drop_and_settle();
    check(last_clr.lines == 4 && is(8, 0, T_O) && is(9, 1, T_O), "tetris");

    // ---- mini T-spin single: T kicked into the wall slot beside a garbage row
    new_game('{T_O, T_T, T_I});
    repeat (4) press(RIGHT);
    garbage_ready = 1; rand_col = 0;
    drop_and_settle();
    repeat (3) press(LEFT);
    repeat (19) press(SOFT);
    check(active.kind == T_T && active.x == 0 && active.y == 0, "T resting on the garbage row");
    press(CW);
    check(active.rot == 1 && active.x == -1 && active.y == 0, "rotation used the first kick");
    drop_and_settle();
    check(last_clr.lines == 1 && last_clr.tspin && last_clr.mini, "mini T-spin single");

    // ---- lock delay
    new_game('{T_O, T_O, T_O});
    begin
      longint t_last;
      int n0;
      for (int i = 0; i < 19; i++) press(SOFT);
      check(active.y == 0, "soft dropped to the floor");
      t_last = cyc - 11;   // the last soft drop pulse
      n0 = n_locked;
      while (n_locked == n0) @(negedge clk);
      $display("lock delay: %0d cycles after the last move (LOCK_CYCLES = %0d)", cyc - t_last, LOCK);
      check(cyc - t_last >= LOCK && cyc - t_last <= LOCK + 20, "lock delay");
      // move reset limit
      repeat (10) @(negedge clk);
      for (int i = 0; i < 21; i++) press(SOFT);
      n0 = n_locked;
      for (int i = 0; i < 14; i++) begin
        press((i % 2) ? LEFT : RIGHT);
        repeat (LOCK - 60) @(negedge clk);
      end
      check(n_locked == n0, "move resets keep the piece alive");
      press(RIGHT);
      check(n_locked == n0 + 1, "15th reset: locks as soon as grounded");
    end

    // ---- top out
    new_game('{});
    for (int i = 0; i < 12 && playing; i++) begin
      int n0;
      n0 = n_locked;
      @(negedge clk); act = '0; act[HARD] = 1;
      @(negedge clk); act = '0;
      while (n_locked == n0 && playing) @(negedge clk);
      repeat (60) @(negedge clk);
    end
    check(!playing && n_top > 0, "top out");

    // ---- random game with invariants
    one_shot = 0;
    begin
      int prev_cells, n_games = 0;
      longint t_act;
      bit waiting = 0;
      for (int g = 0; g < 6; g++) begin
        seq.delete();
        for (int i = 0; i < 400; i++) seq.push_back(tile_t'(($urandom_range(0, 1) == 0) ? 3 : $urandom_range(1, 7)));
        new_game(seq);
        n_games++;
        prev_cells = 0;
        while (playing) begin
          @(negedge clk);
          act = '0;
          if ($urandom_range(0, 7) == 0) begin
            int r = $urandom_range(0, 99);
            act[(r < 40) ? SOFT : (r < 55) ? CW : (r < 70) ? CCW : (r < 80) ? LEFT : (r < 90) ? RIGHT :
                (r < 95) ? HOLD : HARD] = 1'b1;
          end
          if (waiting && cyc - t_act > 8) waiting = 0;   // refused action
          if (!waiting && act != '0 && dut.state == 2'd2 && dut.eval_done && !dut.hard && dut.pend == '0) begin
            t_act = cyc; waiting = 1;
          end
          garbage_ready = ($urandom_range(0, 3) == 0) ? 4'($urandom_range(1, 4)) : 4'd0;
          rand_col = 4'($urandom_range(0, 15));
          @(posedge clk); #1;
          if (waiting && applied) begin
            // an action that arrived with the evaluation idle
            if (cyc - t_act > worst_lat) worst_lat = int'(cyc - t_act);
            waiting = 0;
          end
          if (locked) begin
            if (!(topped_out)) check(cells() == prev_cells + 4, $sformatf("lock adds four cells (%0d -> %0d)", prev_cells, cells()));
          end
          if (clr_valid) begin
            check(cells() == prev_cells + 4 - 10 * clr.lines, "cleared rows removed");
            for (int y = 0; y < ROWS; y++) begin
              bit full = 1;
              for (int x = 0; x < COLS; x++) if (disp_field[y][x] == 0) full = 0;
              check(!full, "no full row left");
            end
            prev_cells = cells();
          end
          if (garbage_take) prev_cells += 9 * garbage_ready;
        end
        @(negedge clk); act = '0;
      end
      $display("random games %0d, locks %0d, lines %0d, T-spins %0d, worst action latency %0d",
               n_games, n_locked, n_lines, n_tspin, worst_lat);
    end
    check(n_tspin > 0, "T-spins occurred");
    check(worst_lat <= 8, "action latency within 8 cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
