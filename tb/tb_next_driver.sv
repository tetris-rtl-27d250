// tb_next_driver: self-checking testbench for next_driver.
// Random six-piece previews are drawn and the column of 8 pixel tiles is
// scanned: preview slot k occupies tile rows 3k..3k+1 (a blank row
// between slots), each piece in spawn orientation one tile in from the
// left edge; the column is 6 tiles wide and 19 tall.
module tb_next_driver;
  import tetris_pkg::*;
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic en, active;
  logic [5:0][3:0] preview;
  logic [23:0] rgb;
  int checks = 0, failures = 0;

  `include "piece_pics.svh"

  next_driver #(.X0(270), .Y0(60), .TILE_LOG2(3)) dut (.en, .hcount, .vcount, .preview, .active, .rgb);

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 6; t++) begin
      en = (t != 5);
      for (int i = 0; i < 6; i++) preview[i] = 4'((i + t) % 7 + 1);
      if (t == 4) preview[2] = 0;
      for (int v = 50; v < 220; v++)
        for (int h = 260; h < 330; h++) begin
          bit in_box, lit;
          int tr, slot, k;
          hcount = 11'(h); vcount = 10'(v);
          #1;
          in_box = en && h >= 270 && h < 318 && v >= 60 && v < 60 + 19 * 8;
          tr = (v - 60) / 8;
          slot = tr / 3;
          k = (slot < 6) ? int'(preview[slot]) : 0;
          lit = (tr % 3 != 2) && pic_cell(k, (h - 270) / 8 - 1, tr % 3);
          checks++;
          if (active != in_box) failures++;
          if (in_box) begin
            checks++;
            if (rgb != (lit ? tile_rgb(4'(k)) : 24'h202020)) begin
              failures++;
              if (failures < 10) $display("FAIL slot %0d at (%0d,%0d)", slot, h, v);
            end
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
