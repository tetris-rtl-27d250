// playfield_driver: draws a 10 x 20 playfield.
//
// The region starts at (X0, Y0) and each tile is 2^TILE_LOG2 pixels square,
// so the tile column and row are the pixel offset shifted right. Visible row
// 19 is drawn at the top. Each tile is filled with its tetromino colour; the
// last pixel row and column of every tile are drawn darker to show the grid.
// `active` is high inside the region when `en` is set. Combinational. The
// coordinates and tile size are this design's layout.
module playfield_driver
  import tetris_pkg::*;
#(
  parameter int X0 = 100,
  parameter int Y0 = 60,
  parameter int TILE_LOG2 = 4
) (
  input  logic        en,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  input  vfield_t     field,
  output logic        active,
  output logic [23:0] rgb
);
  localparam int T = 1 << TILE_LOG2;
  logic [10:0] dx, dy;
  logic [5:0]  col, rrow;
  logic [3:0]  tile;

  always_comb begin
    dx   = hcount - 11'(X0);
    dy   = 11'(vcount) - 11'(Y0);
    col  = 6'(dx >> TILE_LOG2);
    rrow = 6'(dy >> TILE_LOG2);
    active = en && (hcount >= 11'(X0)) && (hcount < 11'(X0 + COLS * T)) &&
             (11'(vcount) >= 11'(Y0)) && (11'(vcount) < 11'(Y0 + VIS_ROWS * T));
    tile = active ? field[5'(VIS_ROWS - 1) - rrow[4:0]][col[3:0]] : 4'd0;
    rgb  = tile_rgb(tile);
    if (dx[TILE_LOG2-1:0] == '1 || dy[TILE_LOG2-1:0] == '1)
      rgb = {1'b0, rgb[23:17], 1'b0, rgb[15:9], 1'b0, rgb[7:1]};
  end
endmodule
