// next_driver: draws the piece preview, a 6 x 19 region of half-size tiles.
//
// The six queued pieces are stacked top to bottom, piece k in region rows
// 3k and 3k+1 with an empty row after it, each in its spawn orientation
// starting at column 1. The row-to-slot split (r / 3) is a small constant
// lookup. Tiles are 2^TILE_LOG2 pixels. `active` covers the region when
// `en` is set. Combinational. The slot layout is this design's choice.
module next_driver
  import tetris_pkg::*;
#(
  parameter int X0 = 270,
  parameter int Y0 = 60,
  parameter int TILE_LOG2 = 3
) (
  input  logic        en,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  input  logic [5:0][3:0] preview,
  output logic        active,
  output logic [23:0] rgb
);
  localparam int T = 1 << TILE_LOG2;
  logic [10:0] dx, dy;
  logic [2:0]  c, k, s;
  logic [4:0]  r;
  tile_t       piece;
  logic        lit;

  always_comb begin
    dx = hcount - 11'(X0);
    dy = 11'(vcount) - 11'(Y0);
    c  = 3'(dx >> TILE_LOG2);
    r  = 5'(dy >> TILE_LOG2);
    active = en && (hcount >= 11'(X0)) && (hcount < 11'(X0 + 6 * T)) &&
             (11'(vcount) >= 11'(Y0)) && (11'(vcount) < 11'(Y0 + 19 * T));
    k = 3'(r / 5'd3);
    s = 3'(r % 5'd3);
    piece = (k < 3'd6) ? tile_t'(preview[k]) : T_EMPTY;
    lit = 1'b0;
    for (int i = 0; i < 4; i++) begin
      logic [3:0] m;
      logic [1:0] top;
      m   = mino(piece, 2'd0, 2'(i));
      top = (piece == T_O) ? 2'd1 : 2'd2;
      if (s != 3'd2 && 3'(m[3:2]) + 3'd1 == c && 3'(top) - 3'(m[1:0]) == s)
        lit = 1'b1;
    end
    rgb = (lit && piece != T_EMPTY) ? tile_rgb(piece) : 24'h202020;
  end
endmodule
