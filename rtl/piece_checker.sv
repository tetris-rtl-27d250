// piece_checker: one placement validity check.
//
// A candidate piece is valid when each of its four minos lies inside the
// playfield (columns 0..COLS-1, rows 0..ROWS-1) and sits on an empty tile of
// the locked field. This is the unit the game core instantiates three times,
// giving the three checks per clock cycle that the move/rotation search
// uses. Purely combinational.
module piece_checker
  import tetris_pkg::*;
(
  input  field_t field,
  input  piece_t cand,
  output logic   ok
);
  always_comb begin
    logic [3:0]       m;
    logic signed [7:0] cx, cy;
    ok = (cand.kind != T_EMPTY);
    for (int i = 0; i < 4; i++) begin
      m  = mino(cand.kind, cand.rot, 2'(i));
      cx = 8'(cand.x) + 8'(m[3:2]);
      cy = 8'(cand.y) + 8'(m[1:0]);
      if (cx < 0 || cx >= 8'(COLS) || cy < 0 || cy >= 8'(ROWS))
        ok = 1'b0;
      else if (field[cy[4:0]][cx[3:0]] != T_EMPTY)
        ok = 1'b0;
    end
  end
endmodule
