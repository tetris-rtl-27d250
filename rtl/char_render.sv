// char_render: one character of on-screen text.
//
// The character cell sits at (X, Y) and is 6 << SCALE_LOG2 pixels square;
// each font pixel is 2^SCALE_LOG2 screen pixels, so the font row and column
// follow from the offset by a shift. `on` is high when the current pixel
// (hcount, vcount) is a lit pixel of glyph `ch`. Combinational.
module char_render
  import font_pkg::*;
#(
  parameter int X = 0,
  parameter int Y = 0,
  parameter int SCALE_LOG2 = 1
) (
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  input  logic [7:0]  ch,
  output logic        on
);
  localparam int SIZE = 6 << SCALE_LOG2;
  logic [10:0] dx, dy;
  logic [2:0]  col, row;
  logic [35:0] g;

  always_comb begin
    dx  = hcount - 11'(X);
    dy  = 11'(vcount) - 11'(Y);
    col = 3'(dx >> SCALE_LOG2);
    row = 3'(dy >> SCALE_LOG2);
    g   = glyph(ch);
    on  = (hcount >= 11'(X)) && (hcount < 11'(X + SIZE)) &&
          (11'(vcount) >= 11'(Y)) && (11'(vcount) < 11'(Y + SIZE)) &&
          g[35 - (int'(row) * 6 + int'(col))];
  end
endmodule
