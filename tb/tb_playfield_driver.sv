// tb_playfield_driver: self-checking testbench for playfield_driver.
// Random visible fields are drawn and every pixel of the area around the
// 160 x 320 pixel well is compared with the expected tile: 16 x 16 pixel
// tiles, row 19 at the top, each tile's colour from the tile colour table
// with its last pixel column and row drawn at half brightness as a grid.
module tb_playfield_driver;
  import tetris_pkg::*;
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic en, active;
  vfield_t field;
  logic [23:0] rgb;
  int checks = 0, failures = 0;
  logic [23:0] colours[9] = '{24'h101010, 24'h00FFFF, 24'hFFFF00, 24'hFF00FF, 24'h0000FF, 24'hFF8000,
                              24'h00FF00, 24'hFF0000, 24'h808080};

  playfield_driver #(.X0(100), .Y0(60), .TILE_LOG2(4)) dut (.en, .hcount, .vcount, .field, .active, .rgb);

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4; t++) begin
      en = (t != 3);
      for (int y = 0; y < 20; y++) for (int x = 0; x < 10; x++) field[y][x] = 4'($urandom_range(0, 8));
      for (int v = 50; v < 390; v++)
        for (int h = 90; h < 270; h++) begin
          bit in_box;
          logic [23:0] e;
          hcount = 11'(h); vcount = 10'(v);
          #1;
          in_box = en && h >= 100 && h < 260 && v >= 60 && v < 380;
          checks++;
          if (active != in_box) failures++;
          if (in_box) begin
            e = colours[field[19 - (v - 60) / 16][(h - 100) / 16]];
            if ((h - 100) % 16 == 15 || (v - 60) % 16 == 15) e = (e >> 1) & 24'h7F7F7F;
            checks++;
            if (rgb != e) begin
              failures++;
              if (failures < 10) $display("FAIL at (%0d,%0d): %h want %h", h, v, rgb, e);
            end
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
