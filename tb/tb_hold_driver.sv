// tb_hold_driver: self-checking testbench for hold_driver.
// For every piece kind and for an empty hold slot, the 6 x 4 tile box
// (8 pixel tiles) is scanned: the piece must appear in its spawn
// orientation, one tile in from the left and top edges, in its colour, on
// a dark background; nothing may be drawn outside the box.
module tb_hold_driver;
  import tetris_pkg::*;
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic en, active;
  tile_t piece;
  logic [23:0] rgb;
  int checks = 0, failures = 0;

  `include "piece_pics.svh"

  hold_driver #(.X0(40), .Y0(60), .TILE_LOG2(3)) dut (.en, .hcount, .vcount, .piece, .active, .rgb);

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k <= 8; k++) begin
      piece = tile_t'(k == 8 ? 0 : k);
      en = (k != 8);
      for (int v = 50; v < 100; v++)
        for (int h = 30; h < 100; h++) begin
          bit in_box, lit;
          hcount = 11'(h); vcount = 10'(v);
          #1;
          in_box = en && h >= 40 && h < 88 && v >= 60 && v < 92;
          lit = pic_cell(k, (h - 40) / 8 - 1, (v - 60) / 8 - 1);
          checks++;
          if (active != in_box) failures++;
          if (in_box) begin
            checks++;
            if (rgb != (lit ? tile_rgb(4'(k)) : 24'h202020)) begin
              failures++;
              if (failures < 10) $display("FAIL kind %0d at (%0d,%0d)", k, h, v);
            end
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
