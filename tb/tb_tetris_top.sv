// tb_tetris_top: end-to-end testbench of two tetris_top boards (master and
// slave) connected pin to pin by their TSPIN links, driven only through the
// button pins, with scaled times (DAS 2000, ARR 500, lock delay 20000,
// gravity 100000, garbage delay 50000 clocks, 500 clocks per "millisecond",
// bit time 20 clocks, music slot 100000 clocks). The VGA timing is not
// scaled (one frame = 692640 clocks).
//
// A small placement planner plays the games: for the falling piece it tries
// every rotation and column on the locked field (read from the board),
// scores the result (lines, holes, height, bumpiness), then presses Spin R,
// Left/Right and Hard drop. The test walks through:
//   1. the start screen and VGA frames (sync rate),
//   2. a 40-line sprint on the master (hard drop starts it), with a hold, a
//      soft drop and a DAS auto-repeat checked on the piece position, to
//      the sprint-won screen and back to the start screen,
//   3. a battle: both players press Hold, the boards start together over
//      the link, both play, game data and garbage cross the link (the
//      opponent field each board receives is compared with the other
//      board's field), one data line is cut for a moment so that a packet
//      must be resent, then the slave stops playing and tops out (unless a
//      board has already topped out); the board that topped out must show
//      the lost screen and the other board the won screen.
// Every mechanism is counted; a mechanism that never happened is a
// failure. Input-to-display latency (latency_counter) must end at the
// vertical sync of the first frame drawn after the input, at most two
// frame times later.
module tb_tetris_top;
  import tetris_pkg::*;
  localparam int FRAME = 1040 * 666;
  logic clk = 0, rst_n = 0;
  logic [7:0] btn_n [2];
  logic [7:0] r [2], g [2], b [2], dac [2];
  logic hs [2], vs [2], bl [2], nclk [2], th [2], dclk [2];
  logic [3:0] td [2];
  logic cut = 0;
  sys_state_t ss [2];
  logic [23:0] lat_last [2], lat_worst [2];
  logic [15:0] lat_cnt [2];
  field_t fld [2];
  piece_t act_p [2];
  tile_t hold_p [2];
  logic [9:0] lines [2], sent [2];
  logic [15:0] resends [2];
  logic [799:0] opp_pfd [2];
  vfield_t vf [2];
  logic [3:0] pend [2];
  int checks = 0, failures = 0;
  longint cyc = 0;

  for (genvar i = 0; i < 2; i++) begin : g_b
    tetris_top #(
      .IS_MASTER(i == 0), .DAS_CYCLES(2000), .ARR_CYCLES(500), .LOCK_CYCLES(20000),
      .GRAVITY_CYCLES(100000), .GARBAGE_DELAY(50000), .CYC_PER_MS(500), .NET_DIV(20),
      .SLOT_CYCLES(100000)
    ) u (
      .clk, .rst_n, .btn_n(btn_n[i]), .sw_frames(1'b1), .sw_music(1'b1),
      .vga_r(r[i]), .vga_g(g[i]), .vga_b(b[i]), .vga_hs(hs[i]), .vga_vs(vs[i]), .vga_blank_n(bl[i]),
      .net_clk_o(nclk[i]), .net_clk_i(nclk[1-i]), .net_tx_h(th[i]), .net_tx_d(td[i]),
      .net_rx_h(th[1-i]), .net_rx_d((i == 1 && cut) ? 4'b0000 : td[1-i]),
      .dac_data(dac[i]), .dac_clk(dclk[i]), .sys_state(ss[i]),
      .lat_last(lat_last[i]), .lat_worst(lat_worst[i]), .lat_count(lat_cnt[i]));
    assign fld[i]     = u.u_game.u_core.field;
    assign act_p[i]   = u.u_game.u_core.active;
    assign hold_p[i]  = u.u_game.hold_piece;
    assign lines[i]   = u.u_game.lines_cleared;
    assign sent[i]    = u.u_game.lines_sent;
    assign resends[i] = u.u_net.resends;
    assign opp_pfd[i] = u.opp_pfd;
    assign vf[i]      = u.vfield;
    assign pend[i]    = u.u_game.pending;
  end

  // mechanism counters
  int n_frames [2], n_samples [2], n_lock [2], n_clear [2], n_gsent [2], n_grecv [2], n_oppupd [2];
  int n_hold = 0, n_soft = 0, n_das = 0, n_sprint_start = 0, n_sprint_won = 0;
  int n_battle_start = 0, n_resend = 0, n_win = 0, n_lose = 0, n_opp_ok = 0, n_opp_bad = 0;
  int bad_frame = 0;
  longint t_vs [2];
  logic vs_q [2], dclk_q [2];
  vfield_t vf_at_vs [2][$];

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int i = 0; i < 2; i++) begin
      vs_q[i] <= vs[i];
      dclk_q[i] <= dclk[i];
      if (rst_n && vs[i] && !vs_q[i]) begin
        if (n_frames[i] > 0 && cyc - t_vs[i] != FRAME) bad_frame++;
        t_vs[i] = cyc;
        n_frames[i]++;
      end
      if (rst_n && dclk[i] && !dclk_q[i]) n_samples[i]++;
      if (rst_n && g_b[0].u.u_game.u_core.locked && i == 0) n_lock[0]++;
      if (rst_n && g_b[1].u.u_game.u_core.locked && i == 1) n_lock[1]++;
    end
    if (rst_n && g_b[0].u.attack_valid && g_b[0].u.attack != 0 && ss[0] == S_MP_MODE) n_gsent[0]++;
    if (rst_n && g_b[1].u.attack_valid && g_b[1].u.attack != 0 && ss[1] == S_MP_MODE) n_gsent[1]++;
    if (rst_n && g_b[0].u.opp_update) begin n_oppupd[0]++; if (g_b[0].u.opp_gbg != 0) n_grecv[0]++; end
    if (rst_n && g_b[1].u.opp_update) begin n_oppupd[1]++; if (g_b[1].u.opp_gbg != 0) n_grecv[1]++; end
  end
  // snapshot of each board's field as sent at every frame start
  always @(posedge clk)
    for (int i = 0; i < 2; i++)
      if (rst_n && (i == 0 ? g_b[0].u.vsync_start : g_b[1].u.vsync_start)) begin
        vf_at_vs[i].push_back(vf[i]);
        if (vf_at_vs[i].size() > 4) void'(vf_at_vs[i].pop_front());
      end
  // every received opponent field must be one the other board recently sent
  always @(posedge clk)
    for (int i = 0; i < 2; i++)
      if (rst_n && (i == 0 ? g_b[0].u.opp_update : g_b[1].u.opp_update)) begin
        bit ok;
        ok = 0;
        foreach (vf_at_vs[1-i][k]) if (800'(vf_at_vs[1-i][k]) == (i == 0 ? g_b[0].u.u_net.opp_pfd : g_b[1].u.u_net.opp_pfd)) ok = 1;
        if (ok) n_opp_ok++; else n_opp_bad++;
      end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic press(input int i, input int btn, input int len = 120);
    @(negedge clk) btn_n[i][btn] = 1'b0;
    repeat (len) @(negedge clk);
    btn_n[i][btn] = 1'b1;
    repeat (120) @(negedge clk);
  endtask

  // placement planner
  function automatic bit fits(field_t f, piece_t p);
    for (int k = 0; k < 4; k++) begin
      logic [3:0] m;
      int x, y;
      m = mino(p.kind, p.rot, 2'(k));
      x = int'(p.x) + int'(m[3:2]);
      y = int'(p.y) + int'(m[1:0]);
      if (x < 0 || x >= COLS || y < 0 || y >= ROWS) return 0;
      if (f[y][x] != T_EMPTY) return 0;
    end
    return 1;
  endfunction

  function automatic int score(field_t f, piece_t p);
    int h [COLS];
    int holes = 0, agg = 0, bump = 0, full = 0;
    for (int k = 0; k < 4; k++) begin
      logic [3:0] m;
      m = mino(p.kind, p.rot, 2'(k));
      f[int'(p.y) + int'(m[1:0])][int'(p.x) + int'(m[3:2])] = T_GARBAGE;
    end
    for (int y = 0; y < ROWS; y++) begin
      bit all;
      all = 1;
      for (int x = 0; x < COLS; x++) if (f[y][x] == T_EMPTY) all = 0;
      if (all) full++;
    end
    for (int x = 0; x < COLS; x++) begin
      h[x] = 0;
      for (int y = 0; y < ROWS; y++) if (f[y][x] != T_EMPTY) h[x] = y + 1;
      for (int y = 0; y < h[x]; y++) if (f[y][x] == T_EMPTY) holes++;
      agg += h[x];
      if (x > 0) bump += (h[x] > h[x-1]) ? h[x] - h[x-1] : h[x-1] - h[x];
    end
    return 76 * full - 51 * (agg - 10 * full) - 36 * holes - 18 * bump;
  endfunction

  task automatic play_piece(input int i);
    piece_t p, best;
    int best_s, s, tries;
    field_t f;
    f = fld[i];
    p = act_p[i];
    best = p;
    best_s = -1000000;
    for (int rr = 0; rr < 4; rr++)
      for (int x = -3; x < COLS; x++) begin
        piece_t q;
        q = p; q.rot = 2'(rr); q.x = 6'(x);
        if (!fits(f, q)) continue;
        while (q.y > 0) begin
          piece_t d;
          d = q; d.y = q.y - 1;
          if (!fits(f, d)) break;
          q = d;
        end
        s = score(f, q);
        if (s > best_s) begin best_s = s; best = q; end
      end
    tries = 0;
    while (act_p[i].rot != best.rot && tries < 4) begin press(i, 2); tries++; end
    tries = 0;
    while (act_p[i].x != best.x && tries < 12) begin
      press(i, (act_p[i].x > best.x) ? 6 : 4);
      tries++;
    end
    press(i, 7);
    repeat (200) @(negedge clk);
  endtask

  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x0, x1, pieces, m0, lat_ok;
    btn_n[0] = 8'hFF; btn_n[1] = 8'hFF;
    for (int i = 0; i < 2; i++) begin
      n_frames[i] = 0; n_samples[i] = 0; n_lock[i] = 0; n_clear[i] = 0;
      n_gsent[i] = 0; n_grecv[i] = 0; n_oppupd[i] = 0; t_vs[i] = 0;
    end
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (2 * FRAME + 1000) @(negedge clk);
    check(ss[0] == S_START_SCREEN && ss[1] == S_START_SCREEN, "both boards on the start screen");
    check(n_frames[0] >= 2 && bad_frame == 0, "VGA frames every 1040 x 666 clocks");
    // 2. sprint on the master
    press(0, 7);
    repeat (100) @(negedge clk);
    if (ss[0] == S_SPRINT_MODE) n_sprint_start++;
    repeat (500) @(negedge clk);
    // hold
    begin
      tile_t k0;
      k0 = act_p[0].kind;
      press(0, 0);
      repeat (50) @(negedge clk);
      if (hold_p[0] == k0 && act_p[0].kind != k0) n_hold++;
    end
    // soft drop
    m0 = int'(act_p[0].y);
    press(0, 5);
    if (int'(act_p[0].y) == m0 - 1) n_soft++;
    // DAS: hold Right for DAS + 2 ARR
    x0 = int'(act_p[0].x);
    press(0, 4, 2000 + 2 * 500 + 400);
    x1 = int'(act_p[0].x);
    if (x1 - x0 >= 3) n_das++;
    $display("DAS: %0d columns for one long press", x1 - x0);
    pieces = 0;
    while (ss[0] == S_SPRINT_MODE && pieces < 200) begin
      play_piece(0);
      pieces++;
    end
    $display("sprint: %0d pieces, %0d lines, state %0d", pieces, lines[0], ss[0]);
    if (ss[0] == S_GAME_WON && lines[0] >= 40) n_sprint_won++;
    // latency: inputs were pressed throughout; wait for the last frame
    repeat (2 * FRAME + 1000) @(negedge clk);
    lat_ok = (lat_cnt[0] > 0) && (lat_worst[0] <= 24'(2 * FRAME));
    check(lat_ok, $sformatf("latency: %0d measured, worst %0d clocks", lat_cnt[0], lat_worst[0]));
    press(0, 7);
    repeat (100) @(negedge clk);
    check(ss[0] == S_START_SCREEN, "confirm returns to the start screen");
    // 3. battle
    press(0, 0);
    repeat (20000) @(negedge clk);
    check(ss[0] == S_MP_READY && ss[1] == S_START_SCREEN, "master waits for the slave");
    press(1, 0);
    repeat (5000) @(negedge clk);
    if (ss[0] == S_MP_MODE && ss[1] == S_MP_MODE) n_battle_start++;
    // both play for a while
    pieces = 0;
    while (pieces < 60 && ss[0] == S_MP_MODE && ss[1] == S_MP_MODE) begin
      fork
        play_piece(0);
        play_piece(1);
      join
      pieces++;
      if (pieces == 20) begin
        // cut the master-to-slave data lines during the next data packet
        @(posedge g_b[0].u.vsync_start);
        cut = 1;
        repeat (400 * 20) @(negedge clk);
        cut = 0;
      end
      if (pieces % 10 == 0) repeat (FRAME / 2) @(negedge clk);
    end
    repeat (2 * FRAME) @(negedge clk);
    $display("battle: %0d pieces each, lines %0d/%0d, sent %0d/%0d", pieces, lines[0], lines[1], sent[0], sent[1]);
    if (resends[0] > 0) n_resend++;
    // the slave gives up: hard drops only
    pieces = 0;
    while (ss[1] == S_MP_MODE && pieces < 60) begin
      press(1, 7);
      repeat (300) @(negedge clk);
      pieces++;
    end
    repeat (3 * FRAME) @(negedge clk);
    $display("end of battle: states %0d/%0d after %0d hard drops", ss[0], ss[1], pieces);
    // whichever board topped out first has lost; the other one must win
    if ((ss[0] == S_GAME_WON && ss[1] == S_GAME_LOST) || (ss[1] == S_GAME_WON && ss[0] == S_GAME_LOST)) begin
      n_win++;
      n_lose++;
    end
    // report
    $display("frames %0d/%0d samples %0d locks %0d/%0d opp updates %0d/%0d ok %0d bad %0d",
             n_frames[0], n_frames[1], n_samples[0], n_lock[0], n_lock[1], n_oppupd[0], n_oppupd[1], n_opp_ok, n_opp_bad);
    $display("garbage sent %0d/%0d received %0d/%0d resends %0d latency last %0d worst %0d",
             n_gsent[0], n_gsent[1], n_grecv[0], n_grecv[1], resends[0], lat_last[0], lat_worst[0]);
    check(n_sprint_start > 0, "mechanism: sprint start");
    check(n_hold > 0, "mechanism: hold");
    check(n_soft > 0, "mechanism: soft drop");
    check(n_das > 0, "mechanism: DAS auto-repeat");
    check(n_lock[0] > 0 && n_lock[1] > 0, "mechanism: hard drop and lock on both boards");
    check(lines[0] > 0 || n_sprint_won > 0, "mechanism: line clear");
    check(n_sprint_won > 0, "mechanism: 40-line sprint won");
    check(n_battle_start > 0, "mechanism: battle start over the link");
    check(n_oppupd[0] > 0 && n_oppupd[1] > 0, "mechanism: game data exchanged");
    check(n_opp_ok > 0 && n_opp_bad == 0, "received opponent fields match the sent ones");
    check(n_gsent[0] + n_gsent[1] > 0, "mechanism: garbage sent");
    check(n_grecv[0] + n_grecv[1] > 0, "mechanism: garbage received");
    check(n_resend > 0, "mechanism: packet resent after a cut line");
    check(n_win > 0, "mechanism: battle won");
    check(n_lose > 0, "mechanism: battle lost (top-out)");
    check(n_samples[0] > 100, "mechanism: music samples");
    check(lat_cnt[0] > 0, "mechanism: latency measured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
