// tb_game_timer: self-checking testbench for game_timer.
// With CYC_PER_MS scaled down to 3 the timer is run with `run` toggled at
// random and compared every cycle with a reference that converts the count
// of running cycles to h:m:s.ms. The run is long enough to roll the
// minutes over into hours; `clear` must zero everything.
module tb_game_timer;
  localparam int CPM = 3;
  logic clk = 0, rst_n = 0, clear = 0, run = 0;
  logic [4:0] hours;
  logic [5:0] minutes, seconds;
  logic [9:0] millis;
  longint ran = 0;
  int checks = 0, failures = 0;

  game_timer #(.CYC_PER_MS(CPM)) dut (.clk, .rst_n, .clear, .run, .hours, .minutes, .seconds, .millis);

  always #5 clk = ~clk;

  task automatic compare();
    longint ms;
    ms = ran / CPM;
    checks++;
    if (millis != 10'(ms % 1000) || seconds != 6'((ms / 1000) % 60) || minutes != 6'((ms / 60000) % 60) ||
        hours != 5'(ms / 3600000)) begin
      failures++;
      if (failures < 10) $display("FAIL at %0d ms: %0d:%0d:%0d.%0d", ms, hours, minutes, seconds, millis);
    end
  endtask

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      compare();
      run = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (run) ran++;
    end
    // run continuously past one hour (3.6e6 ms * 3 cycles)
    @(negedge clk); run = 1;
    while (ran < 3 * 3_600_000 + 3 * 61_000) begin
      @(posedge clk); ran++;
      if (ran % 100_003 == 0) begin @(negedge clk); compare(); end
    end
    @(negedge clk); compare();
    checks++;
    if (hours != 1 || minutes != 1) failures++;
    @(negedge clk); run = 0; clear = 1;
    @(negedge clk); clear = 0; ran = 0;
    compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
