// piece_pics.svh: spawn-orientation pictures of the seven tetrominoes for
// the graphics testbenches. Row 0 is the top row; 'X' marks a mino. Kinds
// follow the tile codes 1..7 (I O T J L S Z).
function automatic string spawn_pic(int kind);
  string t[7] = '{"....XXXX........", "XXXX", ".X.XXX...", "X..XXX...", "..XXXX...", ".XXXX....", "XX..XX..."};
  return t[kind-1];
endfunction
function automatic int pic_n(int kind);
  return (kind == 1) ? 4 : (kind == 2) ? 2 : 3;
endfunction
// cell (col, row) of the picture's occupied rows, with row 0 = the top
// occupied row (the I picture has an empty first row)
function automatic bit pic_cell(int kind, int col, int row);
  string s;
  int n, r;
  if (kind < 1 || kind > 7) return 0;
  s = spawn_pic(kind);
  n = pic_n(kind);
  r = (kind == 1) ? row + 1 : row;
  if (col < 0 || col >= n || r < 0 || r >= n) return 0;
  return s[r * n + col] == "X";
endfunction
