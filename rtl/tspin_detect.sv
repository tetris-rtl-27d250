// tspin_detect: three-corner T-spin test for the piece about to lock.
//
// A lock is a T-spin when the piece is a T, its last successful move was a
// rotation, and at least three of the four tiles diagonal to its centre are
// occupied (walls and floor count as occupied). It is a full T-spin when
// both corners on the side the T points to are occupied, or when the
// rotation needed the last (fifth) SRS kick; otherwise it is a mini T-spin.
// The mini/full rule is the common guideline one; the three-corner test is
// the method this design is built on. Combinational.
module tspin_detect
  import tetris_pkg::*;
(
  input  field_t     field,      // locked field, without the piece
  input  piece_t     piece,
  input  logic       last_rot,   // last successful move was a rotation
  input  logic [2:0] last_kick,  // kick index of that rotation
  output logic       tspin,
  output logic       mini
);
  function automatic logic occ(field_t f, logic signed [7:0] x, logic signed [7:0] y);
    if (x < 0 || x >= 8'(COLS) || y < 0) return 1'b1;
    if (y >= 8'(ROWS)) return 1'b0;
    return f[y[4:0]][x[3:0]] != T_EMPTY;
  endfunction

  logic c_ll, c_lr, c_ul, c_ur;   // corners: lower/upper, left/right
  logic front_a, front_b;

  always_comb begin
    logic signed [7:0] x0, y0;
    x0 = 8'(piece.x);
    y0 = 8'(piece.y);
    c_ll = occ(field, x0,       y0);
    c_lr = occ(field, x0 + 8'sd2, y0);
    c_ul = occ(field, x0,       y0 + 8'sd2);
    c_ur = occ(field, x0 + 8'sd2, y0 + 8'sd2);
    case (piece.rot)
      2'd0:    begin front_a = c_ul; front_b = c_ur; end  // points up
      2'd1:    begin front_a = c_ur; front_b = c_lr; end  // points right
      2'd2:    begin front_a = c_ll; front_b = c_lr; end  // points down
      default: begin front_a = c_ll; front_b = c_ul; end  // points left
    endcase
    tspin = (piece.kind == T_T) && last_rot &&
            (3'(c_ll) + 3'(c_lr) + 3'(c_ul) + 3'(c_ur) >= 3'd3);
    mini  = tspin && !(front_a && front_b) && (last_kick != 3'd4);
  end
endmodule
