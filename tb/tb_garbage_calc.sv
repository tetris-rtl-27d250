// tb_garbage_calc: self-checking testbench for garbage_calc.
// Random sequences of lock results (0..4 lines, T-spin, mini T-spin, all
// clear) are scored with a reference written from the garbage table
// (lines per clear kind, combo bonus 0,1,1,2,2,3,3,4,4,4,5+, back-to-back
// +1, all clear +4). The result must appear exactly one cycle after the
// lock report, and long combos must saturate at 15 lines.
module tb_garbage_calc;
  import tetris_pkg::*;
  logic clk = 0, rst_n = 0, clr_valid = 0, sent_valid, in_combo, b2b;
  clear_t clr;
  logic [3:0] sent;
  logic [4:0] combo;
  int checks = 0, failures = 0;
  int r_combo = -1, max_sent = 0;
  bit r_b2b = 0;
  int n_b2b = 0, n_ac = 0, n_combo5 = 0;

  garbage_calc dut (.clk, .rst_n, .clr_valid, .clr, .sent_valid, .sent, .combo, .in_combo, .b2b);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic int ref_score(clear_t c);
    int base, bonus;
    int cb[11] = '{0, 1, 1, 2, 2, 3, 3, 4, 4, 4, 5};
    bit hard;
    if (c.lines == 0) begin r_combo = -1; return 0; end
    if (c.tspin && c.mini) base = (c.lines == 1) ? 0 : (c.lines == 2) ? 1 : 0;
    else if (c.tspin) base = 2 * c.lines;
    else base = (c.lines == 1) ? 0 : (c.lines == 2) ? 1 : (c.lines == 3) ? 2 : 4;
    r_combo++;
    bonus = cb[(r_combo > 10) ? 10 : r_combo];
    hard = (c.lines == 4) || c.tspin;
    if (hard && r_b2b) begin bonus++; n_b2b++; end
    r_b2b = hard;
    if (c.all_clear) begin bonus += 4; n_ac++; end
    if (r_combo >= 5) n_combo5++;
    return (base + bonus > 15) ? 15 : base + bonus;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      int exp_s;
      @(negedge clk);
      clr_valid = 1;
      clr.lines = 3'($urandom_range(0, 4));
      if ($urandom_range(0, 2) == 0 && i % 300 > 30) clr.lines = 3'd0;   // break combos
      if (i % 300 < 30) clr.lines = (i % 2) ? 3'd4 : 3'd3;                // long combo
      clr.tspin = (clr.lines != 0 && clr.lines < 4 && $urandom_range(0, 2) == 0);
      clr.mini = clr.tspin && clr.lines < 3 && $urandom_range(0, 1) == 1;
      clr.all_clear = (clr.lines != 0 && $urandom_range(0, 9) == 0);
      exp_s = ref_score(clr);
      @(negedge clk);
      clr_valid = 0;
      check(sent_valid, "sent_valid one cycle after the report");
      if (clr.lines != 0) check(sent == 4'(exp_s), $sformatf("score %0d want %0d (lines %0d ts %0d mini %0d ac %0d)",
                                                            sent, exp_s, clr.lines, clr.tspin, clr.mini, clr.all_clear));
      if (exp_s > max_sent) max_sent = exp_s;
      @(negedge clk);
      check(!sent_valid, "sent_valid is one cycle");
    end
    check(max_sent == 15, "saturation reached");
    check(n_b2b > 50 && n_ac > 50 && n_combo5 > 50, "bonuses exercised");
    $display("b2b %0d, all clear %0d, combo>=5 %0d", n_b2b, n_ac, n_combo5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
