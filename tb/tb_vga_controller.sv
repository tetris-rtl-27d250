// tb_vga_controller: self-checking testbench for vga_controller at its
// default 800 x 600 @ 72 Hz timing. Over two full frames it measures: line
// period 1040 clocks, hsync pulse 120 clocks starting 56 after the visible
// 800, frame period 666 lines (692640 clocks, 72.2 Hz at 50 MHz), vsync
// pulse 6 lines starting 37 lines after the visible 600, positive sync
// polarity, blanking outside 800 x 600, and one frame_start and one
// vsync_start per frame at the right positions.
module tb_vga_controller;
  logic clk = 0, rst_n = 0;
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic hsync, vsync, blank, frame_start, vsync_start;
  int checks = 0, failures = 0;
  longint cyc = 0;
  longint hs_rise[$], hs_fall[$], vs_rise[$], vs_fall[$], fs[$], vss[$];
  logic hs_d = 0, vs_d = 0;
  int blank_err = 0;

  vga_controller dut (.clk, .rst_n, .hcount, .vcount, .hsync, .vsync, .blank, .frame_start, .vsync_start);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    repeat (2 * 692640 + 2000) begin
      @(posedge clk);
      #1;
      cyc++;
      if (hsync && !hs_d) hs_rise.push_back(cyc);
      if (!hsync && hs_d) hs_fall.push_back(cyc);
      if (vsync && !vs_d) vs_rise.push_back(cyc);
      if (!vsync && vs_d) vs_fall.push_back(cyc);
      if (frame_start) fs.push_back(cyc);
      if (vsync_start) vss.push_back(cyc);
      if (blank != (hcount >= 800 || vcount >= 600)) blank_err++;
      hs_d = hsync; vs_d = vsync;
    end
    check(hs_rise[1] - hs_rise[0] == 1040, $sformatf("line period %0d", hs_rise[1] - hs_rise[0]));
    check(hs_fall[1] - hs_rise[1] == 120, "hsync width 120");
    check(vs_rise.size() == 2 && vs_rise[1] - vs_rise[0] == 692640, "frame period 692640 clocks");
    check(vs_fall[0] - vs_rise[0] == 6 * 1040, "vsync width 6 lines");
    check(fs.size() == 2 && fs[1] - fs[0] == 692640, "one frame_start per frame");
    check(vss.size() == 2 && vss[1] - fs[0] == 637 * 1040, "vsync_start 637 lines after frame start");
    check(vs_rise[0] == vss[0] + 0 || vs_rise[0] == vss[0], "vsync rises with vsync_start");
    check(blank_err == 0, "blanking");
    $display("refresh rate %0d mHz", 64'd50_000_000_000 / 64'd692640);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
