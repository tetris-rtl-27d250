// tb_input_handler: self-checking testbench for input_handler.
// DAS and ARR are scaled down (200 and 50 cycles); HOLD_MIN stays 63.
// Checks: presses shorter than 63 cycles never fire; a held button fires
// once after the synchronizer and qualification delay, then after exactly
// DAS cycles and every ARR cycles; every pulse is one cycle wide; a
// non-repeating instance fires once per press; a pulse waits while the
// cooldown input is high and fires in the cycle after it drops.
module tb_input_handler;
  localparam int HM = 63, DAS = 200, ARR = 50;
  localparam int FIRST = HM + 3;   // edges from the level change to the pulse
  logic clk = 0, rst_n = 0, raw = 0, block = 0, pulse, pulse_nr;
  int checks = 0, failures = 0;
  longint cyc = 0;
  longint times[$], times_nr[$];

  input_handler #(.HOLD_MIN(HM), .DAS_CYCLES(DAS), .ARR_CYCLES(ARR), .REPEAT(1'b1)) dut
    (.clk, .rst_n, .raw, .block, .pulse);
  input_handler #(.HOLD_MIN(HM), .DAS_CYCLES(DAS), .ARR_CYCLES(ARR), .REPEAT(1'b0)) dut_nr
    (.clk, .rst_n, .raw, .block, .pulse(pulse_nr));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    #1;
    if (rst_n && pulse) times.push_back(cyc);
    if (rst_n && pulse_nr) times_nr.push_back(cyc);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    // glitches shorter than the qualification time
    for (int g = 1; g < HM; g += 7) begin
      @(negedge clk); raw = 1;
      repeat (g) @(negedge clk);
      raw = 0;
      repeat (10) @(negedge clk);
    end
    check(times.size() == 0 && times_nr.size() == 0, "short presses ignored");
    // held press
    @(negedge clk); raw = 1; t0 = cyc;
    repeat (FIRST + DAS + 6 * ARR + 5) @(negedge clk);
    raw = 0;
    check(times.size() == 8, $sformatf("8 pulses in the hold, got %0d", times.size()));
    if (times.size() == 8) begin
      check(times[0] - t0 == FIRST, $sformatf("first pulse after %0d edges", times[0] - t0));
      check(times[1] - times[0] == DAS, $sformatf("DAS interval %0d", times[1] - times[0]));
      for (int k = 2; k < 8; k++) check(times[k] - times[k-1] == ARR, "ARR interval");
      for (int k = 1; k < 8; k++) check(times[k] != times[k-1] + 1, "one-cycle pulses");
    end
    check(times_nr.size() == 1, "no repeat when REPEAT = 0");
    repeat (10) @(negedge clk);
    // blocked by the cooldown
    times.delete();
    block = 1;
    raw = 1; t0 = cyc;
    repeat (FIRST + 20) @(negedge clk);
    check(times.size() == 0, "no pulse while blocked");
    block = 0;
    repeat (3) @(negedge clk);
    check(times.size() == 1 && times[0] == t0 + FIRST + 21, "pulse right after the cooldown");
    raw = 0;
    repeat (10) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
