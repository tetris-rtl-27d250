// tb_timer_driver: self-checking testbench for timer_driver.
// For several times the whole screen around the text is scanned and each
// pixel compared with the reference rendering of "h:mm:ss.mmm"; `en` low
// must blank it.
module tb_timer_driver;
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic en;
  logic [4:0] hours;
  logic [5:0] minutes, seconds;
  logic [9:0] millis;
  logic active;
  logic [23:0] rgb;
  int checks = 0, failures = 0;

  `include "text_ref.svh"

  timer_driver #(.X(100), .Y(400), .SCALE_LOG2(1)) dut (.en, .hcount, .vcount, .hours, .minutes, .seconds,
                                                        .millis, .active, .rgb);

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5; t++) begin
      string s;
      hours = 5'($urandom_range(0, 9)); minutes = 6'($urandom_range(0, 59));
      seconds = 6'($urandom_range(0, 59)); millis = 10'($urandom_range(0, 999));
      if (t == 0) begin hours = 1; minutes = 2; seconds = 3; millis = 45; end
      s = $sformatf("%0d:%02d:%02d.%03d", hours, minutes, seconds, millis);
      if (t == 0) begin checks++; if (s != "1:02:03.045") failures++; end
      en = (t != 4);
      for (int v = 390; v < 420; v++)
        for (int h = 90; h < 250; h++) begin
          bit e;
          hcount = 11'(h); vcount = 10'(v);
          #1;
          e = en && text_on(s, 100, 400, 1, h, v);
          checks++;
          if (active != e || (active && rgb != 24'hFFFFFF)) begin
            failures++;
            if (failures < 10) $display("FAIL %s at (%0d,%0d)", s, h, v);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
