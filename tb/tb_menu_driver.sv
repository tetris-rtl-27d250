// tb_menu_driver: self-checking testbench for menu_driver.
// Scans the full visible screen for the start screen and for the battle
// ready screen and compares every pixel with the reference rendering of
// the expected strings; with neither screen selected nothing may light.
module tb_menu_driver;
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic start_screen, ready_screen, active;
  logic [23:0] rgb;
  int checks = 0, failures = 0;

  `include "text_ref.svh"

  menu_driver dut (.start_screen, .ready_screen, .hcount, .vcount, .active, .rgb);

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 3; m++) begin
      start_screen = (m == 0);
      ready_screen = (m == 1);
      for (int v = 0; v < 600; v += 1)
        for (int h = 0; h < 800; h += 3) begin
          bit e;
          hcount = 11'(h); vcount = 10'(v);
          #1;
          if (m == 0) e = text_on("TETRIS", 256, 120, 3, h, v) || text_on("DROP - SPRINT", 244, 300, 2, h, v) ||
                          text_on("HOLD - BATTLE", 244, 360, 2, h, v);
          else if (m == 1) e = text_on("READY", 280, 200, 3, h, v) || text_on("WAITING", 316, 320, 2, h, v);
          else e = 0;
          checks++;
          if (active != e) begin
            failures++;
            if (failures < 10) $display("FAIL screen %0d at (%0d,%0d)", m, h, v);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
