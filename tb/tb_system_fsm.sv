// tb_system_fsm: self-checking testbench for system_fsm.
// Walks the menu paths: start screen -> Sprint (hard drop) -> won after
// 40 lines -> start screen; Sprint -> lost on top-out; start screen ->
// battle ready (hold) -> battle on the network start -> won on the
// network's win signal, and -> lost on top-out. Checks the one-cycle
// game_start pulse, the in_game/mp_ready/lost outputs and that inputs
// that do not apply in a state are ignored.
module tb_system_fsm;
  import tetris_pkg::*;
  logic clk = 0, rst_n = 0;
  logic sel_sprint = 0, sel_battle = 0, confirm = 0, net_start = 0, net_won = 0, topped_out = 0;
  logic [9:0] lines_cleared = 0;
  sys_state_t state;
  logic game_start, in_game, mp_ready, lost;
  int checks = 0, failures = 0, starts = 0;

  system_fsm #(.SPRINT_LINES(40)) dut (.clk, .rst_n, .sel_sprint, .sel_battle, .confirm, .net_start,
                                       .net_won, .topped_out, .lines_cleared, .state, .game_start,
                                       .in_game, .mp_ready, .lost);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && game_start) starts++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (state %s)", what, state.name()); end
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1;
    @(negedge clk); s = 0;
  endtask

  task automatic expect_state(sys_state_t s, string what);
    @(negedge clk);
    check(state == s, what);
    check(in_game == (s == S_SPRINT_MODE || s == S_MP_MODE), "in_game");
    check(mp_ready == (s == S_MP_READY), "mp_ready");
    check(lost == (s == S_GAME_LOST), "lost");
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    expect_state(S_START_SCREEN, "reset state");
    pulse(confirm); pulse(net_start); pulse(topped_out);
    expect_state(S_START_SCREEN, "stray inputs ignored");
    // Sprint to 40 lines
    @(negedge clk); sel_sprint = 1;
    @(negedge clk); sel_sprint = 0;
    check(game_start, "game_start pulse on entering Sprint");
    check(state == S_SPRINT_MODE, "sprint entered");
    @(negedge clk);
    check(!game_start, "game_start lasts one cycle");
    pulse(sel_battle); pulse(net_won);
    lines_cleared = 39;
    expect_state(S_SPRINT_MODE, "39 lines: still playing");
    lines_cleared = 40;
    @(negedge clk);
    expect_state(S_GAME_WON, "40 lines: won");
    lines_cleared = 0;
    pulse(sel_sprint);
    expect_state(S_GAME_WON, "end screen waits for confirm");
    pulse(confirm);
    expect_state(S_START_SCREEN, "back to start");
    // Sprint top-out
    pulse(sel_sprint);
    pulse(topped_out);
    expect_state(S_GAME_LOST, "sprint top-out");
    pulse(confirm);
    // Battle
    pulse(sel_battle);
    expect_state(S_MP_READY, "battle ready");
    check(starts == 2, $sformatf("no game_start before the network start (%0d)", starts));
    pulse(sel_sprint);
    expect_state(S_MP_READY, "sprint ignored while ready");
    pulse(net_start);
    expect_state(S_MP_MODE, "battle running");
    check(starts == 3, "game_start on network start");
    lines_cleared = 100;
    expect_state(S_MP_MODE, "no line goal in battle");
    pulse(net_won);
    expect_state(S_GAME_WON, "battle won");
    pulse(confirm);
    pulse(sel_battle); pulse(net_start);
    pulse(topped_out);
    expect_state(S_GAME_LOST, "battle lost");
    pulse(confirm);
    expect_state(S_START_SCREEN, "back to start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
