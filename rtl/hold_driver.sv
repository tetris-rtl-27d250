// hold_driver: draws the hold slot, a 6 x 4 region of half-size tiles.
//
// The held piece is drawn in its spawn orientation in region rows 1..2
// (top to bottom) starting at column 1, leaving a one-tile border. Tiles are
// 2^TILE_LOG2 pixels (half the playfield tile). Empty cells are dark grey.
// `active` covers the whole region when `en` is set. Combinational.
module hold_driver
  import tetris_pkg::*;
#(
  parameter int X0 = 40,
  parameter int Y0 = 60,
  parameter int TILE_LOG2 = 3
) (
  input  logic        en,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  input  tile_t       piece,
  output logic        active,
  output logic [23:0] rgb
);
  localparam int T = 1 << TILE_LOG2;
  logic [10:0] dx, dy;
  logic [2:0]  c, r;
  logic        lit;

  always_comb begin
    dx = hcount - 11'(X0);
    dy = 11'(vcount) - 11'(Y0);
    c  = 3'(dx >> TILE_LOG2);
    r  = 3'(dy >> TILE_LOG2);
    active = en && (hcount >= 11'(X0)) && (hcount < 11'(X0 + 6 * T)) &&
             (11'(vcount) >= 11'(Y0)) && (11'(vcount) < 11'(Y0 + 4 * T));
    lit = 1'b0;
    for (int i = 0; i < 4; i++) begin
      logic [3:0] m;
      logic [1:0] top;
      m   = mino(piece, 2'd0, 2'(i));
      top = (piece == T_O) ? 2'd1 : 2'd2;     // box row drawn in region row 1
      if (3'(m[3:2]) + 3'd1 == c && 3'(top) - 3'(m[1:0]) + 3'd1 == r)
        lit = 1'b1;
    end
    rgb = (lit && piece != T_EMPTY) ? tile_rgb(piece) : 24'h202020;
  end
endmodule
