// tb_net_stack: self-checking testbench for net_stack (and the net_pkg
// packet formats it uses). A master and a slave stack are cross-connected
// pin to pin, with bit ticks scaled to one per 20 clocks. The test checks:
// nothing is started while only one board is ready; both boards start the
// battle once both are ready, within a few handshake packet times of each
// other; game data sent every frame by each board arrives intact at the
// other one, in order, with its garbage lines; a top-out on one board makes
// the other board win, and both return to idle after the game-end exchange.
module tb_net_stack;
  import net_pkg::*;
  localparam int DIV = 20, FRAME = 7000;
  logic clk = 0, rst_n = 0;
  logic clk_m, clk_s_unused, h_m, h_s;
  logic [3:0] d_m, d_s;
  logic [1:0] ready = 0, lost = 0, upd = 0, gadd = 0;
  logic [3:0] hld [2], gbg [2];
  logic [5:0][3:0] pq [2];
  logic [799:0] pfd [2];
  logic [1:0] start, won, got;
  logic [3:0] o_gbg [2], o_hld [2];
  logic [5:0][3:0] o_pq [2];
  logic [799:0] o_pfd [2];
  logic [2:0] cst [2];
  logic [15:0] rs [2], dp [2];
  int checks = 0, failures = 0;
  int n_start [2], n_won [2], n_got [2], g_sent [2], g_got [2];
  longint cyc = 0, t_start [2];
  logic [831:0] q0[$], q1[$];

  net_stack #(.IS_MASTER(1'b1), .DIV(DIV), .TIMEOUT_BITS(64), .TO_BITS(30)) m (
    .clk, .rst_n, .net_clk_o(clk_m), .net_clk_i(1'b0), .tx_h(h_m), .tx_d(d_m), .rx_h(h_s), .rx_d(d_s),
    .mp_ready(ready[0]), .lost(lost[0]), .update_data(upd[0]), .hld(hld[0]), .pq(pq[0]), .pfd(pfd[0]),
    .garbage_add(gadd[0]), .garbage(gbg[0]), .game_start(start[0]), .game_won(won[0]),
    .update_opponent_data(got[0]), .opp_gbg(o_gbg[0]), .opp_hld(o_hld[0]), .opp_pq(o_pq[0]),
    .opp_pfd(o_pfd[0]), .ctrl_state(cst[0]), .resends(rs[0]), .dups(dp[0]));
  net_stack #(.IS_MASTER(1'b0), .DIV(DIV), .TIMEOUT_BITS(64), .TO_BITS(30)) s (
    .clk, .rst_n, .net_clk_o(clk_s_unused), .net_clk_i(clk_m), .tx_h(h_s), .tx_d(d_s), .rx_h(h_m), .rx_d(d_m),
    .mp_ready(ready[1]), .lost(lost[1]), .update_data(upd[1]), .hld(hld[1]), .pq(pq[1]), .pfd(pfd[1]),
    .garbage_add(gadd[1]), .garbage(gbg[1]), .game_start(start[1]), .game_won(won[1]),
    .update_opponent_data(got[1]), .opp_gbg(o_gbg[1]), .opp_hld(o_hld[1]), .opp_pq(o_pq[1]),
    .opp_pfd(o_pfd[1]), .ctrl_state(cst[1]), .resends(rs[1]), .dups(dp[1]));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) for (int b = 0; b < 2; b++) begin
      if (start[b]) begin n_start[b]++; t_start[b] = cyc; end
      if (won[b]) n_won[b]++;
      if (got[b]) begin
        logic [831:0] e;
        n_got[b]++;
        g_got[b] += o_gbg[b];
        checks++;
        // board b receives what the other board sent
        if ((b == 0 ? q1.size() : q0.size()) == 0) begin
          failures++; $display("FAIL: board %0d received data nobody sent", b);
        end else begin
          e = (b == 0) ? q1.pop_front() : q0.pop_front();
          if ({o_gbg[b], o_hld[b], o_pq[b], o_pfd[b]} != e) begin
            failures++; $display("FAIL: board %0d received wrong data", b);
          end
        end
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic frame();
    @(negedge clk);
    for (int b = 0; b < 2; b++) begin
      int g;
      g = $urandom_range(0, 3);
      hld[b] = 4'($urandom);
      for (int i = 0; i < 6; i++) pq[b][i] = 4'($urandom);
      for (int i = 0; i < 25; i++) pfd[b][i*32 +: 32] = $urandom;
      gbg[b] = 4'(g); gadd[b] = (g != 0); upd[b] = 1;
      g_sent[b] += g;
      if (b == 0) q0.push_back({4'(g), hld[0], pq[0], pfd[0]});
      else        q1.push_back({4'(g), hld[1], pq[1], pfd[1]});
    end
    @(negedge clk);
    upd = 0; gadd = 0;
    repeat (FRAME) @(negedge clk);
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < 2; b++) begin
      n_start[b] = 0; n_won[b] = 0; n_got[b] = 0; g_sent[b] = 0; g_got[b] = 0;
      hld[b] = 0; gbg[b] = 0; pq[b] = 0; pfd[b] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // only the master is ready: no start
    ready[0] = 1;
    repeat (200 * DIV) @(negedge clk);
    check(n_start[0] == 0 && n_start[1] == 0, "no start with one board ready");
    ready[1] = 1;
    repeat (100 * DIV) @(negedge clk);
    check(n_start[0] == 1 && n_start[1] == 1, "both boards start");
    check(t_start[0] - t_start[1] < 40 * DIV && t_start[1] - t_start[0] < 40 * DIV,
          $sformatf("starts %0d clocks apart", t_start[0] - t_start[1]));
    ready = 0;  // the game screens leave the ready state once started
    for (int f = 0; f < 8; f++) frame();
    check(n_got[0] == 8 && n_got[1] == 8, $sformatf("8 frames each way (%0d, %0d)", n_got[0], n_got[1]));
    check(g_got[0] == g_sent[1] && g_got[1] == g_sent[0], "garbage totals");
    check(rs[0] == 0 && rs[1] == 0, "no resends on a clean link");
    // the slave tops out
    @(negedge clk) lost[1] = 1; @(negedge clk) lost[1] = 0;
    repeat (100 * DIV) @(negedge clk);
    check(n_won[0] == 1 && n_won[1] == 0, "master wins when the slave tops out");
    repeat (100 * DIV) @(negedge clk);
    check(cst[0] == 0 && cst[1] == 0, $sformatf("both idle after the game (%0d, %0d)", cst[0], cst[1]));
    $display("frames %0d/%0d resends %0d/%0d", n_got[0], n_got[1], rs[0], rs[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
