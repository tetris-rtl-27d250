// tb_controller_if: self-checking testbench for controller_if.
// Drives the eight active-low button pins with DAS/ARR scaled down and
// checks: each button maps to its action (buttons 0 and 3 both hold),
// hold and hard drop never repeat while movement does, a second button
// pressed shortly after a first one is delayed until the 15-cycle cooldown
// after the first pulse has expired, and no action is ever lost.
module tb_controller_if;
  import tetris_pkg::*;
  localparam int DAS = 300, ARR = 60, CD = 15;
  logic clk = 0, rst_n = 0;
  logic [7:0] btn_n = 8'hFF;
  actions_t act;
  int checks = 0, failures = 0;
  longint cyc = 0;
  int cnt[7];
  longint last_t[7];
  longint last_any = -1000, min_gap = 1000;

  controller_if #(.COOLDOWN(CD), .HOLD_MIN(63), .DAS_CYCLES(DAS), .ARR_CYCLES(ARR)) dut (.clk, .rst_n, .btn_n, .act);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    #1;
    if (rst_n && act != 0) begin
      for (int i = 0; i < 7; i++) if (act[i]) begin cnt[i]++; last_t[i] = cyc; end
      if (cyc - last_any < min_gap) min_gap = cyc - last_any;
      last_any = cyc;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // act bit: 0 hard, 1 soft, 2 right, 3 left, 4 cw, 5 ccw, 6 hold
  function automatic int bit_of(int b);
    case (b)
      0, 3: return 6;
      1: return 5;
      2: return 4;
      4: return 2;
      5: return 1;
      6: return 3;
      default: return 0;
    endcase
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    for (int b = 0; b < 8; b++) begin
      int exp_n;
      foreach (cnt[i]) cnt[i] = 0;
      btn_n[b] = 0;
      repeat (66 + DAS + 2 * ARR + 10) @(negedge clk);
      btn_n[b] = 1;
      repeat (20) @(negedge clk);
      exp_n = (bit_of(b) == 6 || bit_of(b) == 0) ? 1 : 4;
      for (int i = 0; i < 7; i++)
        check(cnt[i] == ((i == bit_of(b)) ? exp_n : 0),
              $sformatf("button %0d: action %0d fired %0d times", b, i, cnt[i]));
    end
    // cooldown: right, then left 5 cycles later
    foreach (cnt[i]) cnt[i] = 0;
    min_gap = 1000;
    btn_n[4] = 0;
    repeat (5) @(negedge clk);
    btn_n[6] = 0;
    repeat (100) @(negedge clk);
    btn_n[4] = 1; btn_n[6] = 1;
    repeat (20) @(negedge clk);
    check(cnt[2] == 1 && cnt[3] == 1, "both actions delivered");
    check(last_t[3] - last_t[2] == CD + 1, $sformatf("second action %0d cycles after the first", last_t[3] - last_t[2]));
    check(min_gap > CD, "pulses at least the cooldown apart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
