// tb_lines_driver: self-checking testbench for lines_driver.
// Scans the area of the two text rows ("LINES nnn" and, when show_sent is
// set, "SENT  nnn" two text heights lower) and compares every pixel with
// the reference rendering.
module tb_lines_driver;
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic en, show_sent, active;
  logic [9:0] cleared, sent;
  logic [23:0] rgb;
  int checks = 0, failures = 0;

  `include "text_ref.svh"

  lines_driver #(.X(100), .Y(430), .SCALE_LOG2(1)) dut (.en, .show_sent, .hcount, .vcount, .cleared, .sent,
                                                        .active, .rgb);

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4; t++) begin
      string s0, s1;
      cleared = 10'($urandom_range(0, 999)); sent = 10'($urandom_range(0, 999));
      en = (t != 3);
      show_sent = (t != 1);
      s0 = $sformatf("LINES %03d", cleared);
      s1 = $sformatf("SENT  %03d", sent);
      for (int v = 425; v < 470; v++)
        for (int h = 95; h < 220; h++) begin
          bit e;
          hcount = 11'(h); vcount = 10'(v);
          #1;
          e = en && (text_on(s0, 100, 430, 1, h, v) || (show_sent && text_on(s1, 100, 454, 1, h, v)));
          checks++;
          if (active != e) begin
            failures++;
            if (failures < 10) $display("FAIL %s/%s at (%0d,%0d)", s0, s1, h, v);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
