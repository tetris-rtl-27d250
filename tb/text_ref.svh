// text_ref.svh: reference text renderer shared by the graphics testbenches.
// A string drawn at (x0, y0) with 6 x 6 glyphs scaled by 2**sl, glyphs
// side by side without gaps; returns whether screen pixel (h, v) is lit.
function automatic bit text_on(string s, int x0, int y0, int sl, int h, int v);
  int csize, i, px, py;
  logic [35:0] g;
  csize = 6 << sl;
  if (h < x0 || v < y0 || v >= y0 + csize || h >= x0 + csize * s.len()) return 0;
  i  = (h - x0) / csize;
  px = ((h - x0) % csize) >> sl;
  py = (v - y0) >> sl;
  g  = font_pkg::glyph(s[i]);
  return g[35 - (py * 6 + px)];
endfunction
