// tb_net_control: self-checking testbench for net_control, the game start /
// game end state machine of the TSPIN link. Directed sequences walk every
// transition: idle -> ready (ACK stream) -> back to idle when battle mode is
// left; ready -> in game on a received ACK (one game_start pulse, one cycle
// after the ACK); in game -> won on a game-end packet (one game_won pulse,
// ACK stream for TO_BITS bit times, then idle); in game -> lost on a local
// top-out (game-end stream) -> lost-to after the other board's ACK -> idle
// after TO_BITS bit times. Bit ticks come every 4 clocks; TO_BITS = 10.
module tb_net_control;
  localparam int TO = 10;
  logic clk = 0, rst_n = 0, tick, mp_ready = 0, lost = 0, ack_valid = 0, ge_valid = 0;
  logic [1:0] hs_mode;
  logic game_start, game_won, in_game;
  logic [2:0] state;
  int checks = 0, failures = 0, n_start = 0, n_won = 0, ph = 0;

  assign tick = (ph == 0);
  net_control #(.TO_BITS(TO)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    ph <= (ph + 1) % 4;
    if (rst_n && game_start) n_start++;
    if (rst_n && game_won) n_won++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (state %0d mode %0d)", what, state, hs_mode); end
  endtask

  task automatic pulse_ack();
    @(negedge clk) ack_valid = 1; @(negedge clk) ack_valid = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(hs_mode == 0 && !in_game, "idle sends nothing");
    // ACKs and game ends are ignored while idle
    pulse_ack();
    @(negedge clk) ge_valid = 1; @(negedge clk) ge_valid = 0;
    check(n_start == 0 && n_won == 0 && hs_mode == 0, "idle ignores the other board");
    // ready, then leave
    mp_ready = 1; @(negedge clk); @(negedge clk);
    check(hs_mode == 1 && state == 1, "ready streams ACKs");
    mp_ready = 0; @(negedge clk); @(negedge clk);
    check(hs_mode == 0 && state == 0, "leaving battle mode returns to idle");
    // ready -> in game
    mp_ready = 1; repeat (5) @(negedge clk);
    ack_valid = 1; @(negedge clk); ack_valid = 0;
    check(game_start, "game_start one cycle after the ACK");
    @(negedge clk);
    check(!game_start && in_game && hs_mode == 0, "in game, single start pulse");
    // further ACKs in game change nothing
    pulse_ack(); repeat (3) @(negedge clk);
    check(in_game && n_start == 1, "ACK in game ignored");
    // won
    ge_valid = 1; @(negedge clk); ge_valid = 0;
    check(game_won, "game_won one cycle after game-end packet");
    @(negedge clk);
    check(hs_mode == 1 && !in_game, "winner answers with ACKs");
    t0 = 0;
    while (state != 0 && t0 < 1000) begin @(negedge clk); t0++; end
    check(t0 >= (TO - 1) * 4 && t0 <= (TO + 1) * 4, $sformatf("won state lasts TO_BITS bit times (%0d clocks)", t0));
    check(hs_mode == 0 && n_won == 1, "back to idle after winning");
    // lost
    repeat (3) @(negedge clk);
    ack_valid = 1; @(negedge clk); ack_valid = 0; @(negedge clk);
    check(in_game && n_start == 2, "second game starts");
    lost = 1; @(negedge clk); lost = 0; @(negedge clk);
    check(hs_mode == 2 && state == 3, "loser streams game-end packets");
    repeat (200) @(negedge clk);
    check(hs_mode == 2 && state == 3, "game-end stream lasts until ACK");
    ge_valid = 1; @(negedge clk); ge_valid = 0;
    @(negedge clk);
    check(n_won == 1 && state == 3, "game-end received after losing ignored");
    pulse_ack(); @(negedge clk);
    check(hs_mode == 2 && state == 4, "lost-to keeps game-end stream");
    t0 = 0;
    while (state != 0 && t0 < 1000) begin @(negedge clk); t0++; end
    check(t0 >= (TO - 2) * 4 && t0 <= (TO + 1) * 4, $sformatf("lost-to lasts TO_BITS bit times (%0d clocks)", t0));
    mp_ready = 0; repeat (3) @(negedge clk);
    check(state == 0 && hs_mode == 0, "idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
