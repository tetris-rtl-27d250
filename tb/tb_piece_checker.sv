// tb_piece_checker: self-checking testbench for piece_checker.
// The reference shapes are written out here as pictures of each piece in
// each of its four SRS rotations (independent of the rotation arithmetic
// in tetris_pkg). Random fields and random candidate positions, including
// positions partly outside the 10 x 24 field, are checked against them.
module tb_piece_checker;
  import tetris_pkg::*;
  field_t field;
  piece_t cand;
  logic ok;
  int checks = 0, failures = 0, n_ok = 0, n_bad = 0;

  piece_checker dut (.field, .cand, .ok);

  // Shape pictures, top row first, 'X' = mino.
  function automatic string pic(int kind, int rot);
    string t[7][4] = '{
      '{"....XXXX........", "..X...X...X...X.", "........XXXX....", ".X...X...X...X.."},
      '{"XXXX", "XXXX", "XXXX", "XXXX"},
      '{".X.XXX...", ".X..XX.X.", "...XXX.X.", ".X.XX..X."},
      '{"X..XXX...", ".XX.X..X.", "...XXX..X", ".X..X.XX."},
      '{"..XXXX...", ".X..X..XX", "...XXXX..", "XX..X..X."},
      '{".XXXX....", ".X..XX..X", "....XXXX.", "X..XX..X."},
      '{"XX..XX...", "..X.XX.X.", "...XX..XX", ".X.XX.X.."}};
    return t[kind-1][rot];
  endfunction

  function automatic bit ref_ok(field_t f, piece_t p);
    string s;
    int n, cnt;
    if (p.kind < T_I || p.kind > T_Z) return 0;
    s = pic(p.kind, p.rot);
    n = (s.len() == 16) ? 4 : (s.len() == 4) ? 2 : 3;
    cnt = 0;
    for (int r = 0; r < n; r++)
      for (int c = 0; c < n; c++)
        if (s[r*n + c] == "X") begin
          int fx, fy;
          cnt++;
          fx = int'(p.x) + c;
          fy = int'(p.y) + (n - 1 - r);
          if (fx < 0 || fx >= 10 || fy < 0 || fy >= 24) return 0;
          if (f[fy][fx] != 0) return 0;
        end
    return cnt == 4;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      if (i % 50 == 0)
        for (int y = 0; y < 24; y++)
          for (int x = 0; x < 10; x++)
            field[y][x] = ($urandom_range(0, 99) < 10 + (i / 50) % 40) ? 4'($urandom_range(1, 8)) : 4'd0;
      cand.kind = tile_t'((i % 97 == 0) ? 0 : $urandom_range(1, 7));
      cand.rot  = 2'($urandom_range(0, 3));
      cand.x    = 6'($signed($urandom_range(0, 14)) - 3);
      cand.y    = 7'($signed($urandom_range(0, 28)) - 3);
      #1;
      checks++;
      if (ok != ref_ok(field, cand)) begin
        failures++;
        if (failures < 10) $display("FAIL kind %0d rot %0d at (%0d,%0d): got %0d", cand.kind, cand.rot,
                                    cand.x, cand.y, ok);
      end
      if (ok) n_ok++; else n_bad++;
    end
    checks++;
    if (n_ok < 100 || n_bad < 100) failures++;
    $display("fitting %0d, blocked %0d", n_ok, n_bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
