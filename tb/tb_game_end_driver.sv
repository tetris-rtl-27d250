// tb_game_end_driver: self-checking testbench for game_end_driver.
// Scans the screen for a won and a lost end screen and compares each pixel
// with the reference rendering of the result line, the final time and the
// line counts, and checks the result colour (green win, red loss).
module tb_game_end_driver;
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic en, won, battle, active;
  logic [4:0] hours = 0;
  logic [5:0] minutes = 1, seconds = 23;
  logic [9:0] millis = 456, cleared = 40, sent = 7;
  logic [23:0] rgb;
  int checks = 0, failures = 0;

  `include "text_ref.svh"

  game_end_driver dut (.en, .won, .battle, .hcount, .vcount, .hours, .minutes, .seconds, .millis, .cleared,
                       .sent, .active, .rgb);

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 3; m++) begin
      en = (m != 2);
      won = (m == 0);
      battle = 1;
      for (int v = 100; v < 420; v++)
        for (int h = 180; h < 620; h += 2) begin
          bit r, e;
          hcount = 11'(h); vcount = 10'(v);
          #1;
          r = won ? text_on("YOU WIN", 232, 120, 3, h, v) : text_on("YOU LOSE", 208, 120, 3, h, v);
          e = en && (r || text_on("0:01:23.456", 268, 280, 2, h, v) || text_on("LINES 040", 292, 340, 2, h, v) ||
                     text_on("SENT  007", 292, 388, 2, h, v));
          checks++;
          if (active != e || (e && r && rgb != (won ? 24'h00FF00 : 24'hFF0000))) begin
            failures++;
            if (failures < 10) $display("FAIL mode %0d at (%0d,%0d)", m, h, v);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
