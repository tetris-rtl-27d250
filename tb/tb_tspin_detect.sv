// tb_tspin_detect: self-checking testbench for tspin_detect.
// Random fields around a T piece are checked against the three-corner
// rule: a T that was last moved by a rotation and has at least three of
// the four corner cells of its 3 x 3 box occupied (walls and floor count
// as occupied) is a T-spin; it is a mini T-spin unless both corners on the
// side the T points to are occupied or the rotation used the last kick.
// Also checks that other pieces and non-rotations never report a T-spin.
module tb_tspin_detect;
  import tetris_pkg::*;
  field_t field;
  piece_t piece;
  logic last_rot, tspin, mini;
  logic [2:0] last_kick;
  int checks = 0, failures = 0, n_full = 0, n_mini = 0;

  tspin_detect dut (.field, .piece, .last_rot, .last_kick, .tspin, .mini);

  function automatic bit filled(int x, int y);
    if (x < 0 || x > 9 || y < 0) return 1;
    if (y > 23) return 0;
    return field[y][x] != 0;
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
      bit a, b, c, d, e_ts, e_mini, fa, fb;
      int x, y;
      for (int yy = 0; yy < 24; yy++)
        for (int xx = 0; xx < 10; xx++)
          field[yy][xx] = ($urandom_range(0, 1) == 1) ? 4'd8 : 4'd0;
      piece.kind = tile_t'(($urandom_range(0, 4) == 0) ? $urandom_range(1, 7) : 3);
      piece.rot  = 2'($urandom_range(0, 3));
      x = $urandom_range(0, 9) - 1;
      y = $urandom_range(0, 22) - 1;
      piece.x = 6'(x);
      piece.y = 7'(y);
      last_rot  = ($urandom_range(0, 3) != 0);
      last_kick = 3'($urandom_range(0, 4));
      // corners: a lower-left, b lower-right, c upper-left, d upper-right
      a = filled(x, y); b = filled(x + 2, y); c = filled(x, y + 2); d = filled(x + 2, y + 2);
      case (piece.rot)
        0: begin fa = c; fb = d; end
        1: begin fa = b; fb = d; end
        2: begin fa = a; fb = b; end
        default: begin fa = a; fb = c; end
      endcase
      e_ts   = piece.kind == T_T && last_rot && (int'(a) + int'(b) + int'(c) + int'(d) >= 3);
      e_mini = e_ts && !(fa && fb) && last_kick != 4;
      #1;
      checks += 2;
      if (tspin != e_ts || mini != e_mini) begin
        failures++;
        if (failures < 10) $display("FAIL rot %0d at (%0d,%0d) corners %b%b%b%b kick %0d: got %b%b want %b%b",
                                    piece.rot, x, y, a, b, c, d, last_kick, tspin, mini, e_ts, e_mini);
      end
      if (e_ts && !e_mini) n_full++;
      if (e_mini) n_mini++;
    end
    checks++;
    if (n_full < 100 || n_mini < 100) failures++;
    $display("T-spins %0d, minis %0d", n_full, n_mini);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
