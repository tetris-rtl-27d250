// tetris_pkg: types, constants and shape/kick tables shared by the game
// logic and the graphics.
//
// The playfield is COLS x ROWS tiles with row 0 at the bottom and y growing
// upward; rows 0..19 are visible, rows 20..23 are the hidden spawn/buffer
// area. A piece is described by its kind, its rotation (0, R, 2, L) and the
// field position of the lower-left corner of its SRS bounding box (3x3 for
// J L S T Z, 4x4 for I, 2x2 for O). Shapes and wall-kick offsets are the
// standard Super Rotation System tables; the tile colours follow the usual
// I cyan, O yellow, T magenta, J blue, L orange, S green, Z red convention.
// Garbage is grey (this design's choice).
package tetris_pkg;

  localparam int CLK_HZ   = 50_000_000;
  localparam int COLS     = 10;
  localparam int ROWS     = 24;
  localparam int VIS_ROWS = 20;

  typedef enum logic [3:0] {
    T_EMPTY   = 4'd0,
    T_I       = 4'd1,
    T_O       = 4'd2,
    T_T       = 4'd3,
    T_J       = 4'd4,
    T_L       = 4'd5,
    T_S       = 4'd6,
    T_Z       = 4'd7,
    T_GARBAGE = 4'd8
  } tile_t;

  typedef logic [COLS-1:0][3:0]  row_t;    // row[x] = tile code
  typedef row_t [ROWS-1:0]       field_t;  // field[y][x]
  typedef row_t [VIS_ROWS-1:0]   vfield_t; // visible part

  typedef logic signed [5:0] xpos_t;
  typedef logic signed [6:0] ypos_t;

  typedef struct packed {
    tile_t      kind;
    logic [1:0] rot;   // 0 = spawn, 1 = R, 2 = 2, 3 = L
    xpos_t      x;     // bounding box lower-left column
    ypos_t      y;     // bounding box lower-left row
  } piece_t;

  // One-cycle action pulses from the controller interface.
  typedef struct packed {
    logic hold;
    logic rot_ccw;
    logic rot_cw;
    logic left;
    logic right;
    logic soft_drop;
    logic hard_drop;
  } actions_t;

  // Result of locking a piece, consumed by the garbage calculation.
  typedef struct packed {
    logic [2:0] lines;
    logic       tspin;
    logic       mini;
    logic       all_clear;
  } clear_t;

  typedef enum logic [2:0] {
    S_START_SCREEN,
    S_SPRINT_MODE,
    S_MP_READY,
    S_MP_MODE,
    S_GAME_WON,
    S_GAME_LOST
  } sys_state_t;

  // Mino idx (0..3) of a piece kind in rotation rot, as {dx, dy} in its
  // bounding box (y up). Spawn shapes are rotated clockwise rot times with
  // (x, y) -> (y, N-1-x).
  function automatic logic [3:0] mino(tile_t kind, logic [1:0] rot, logic [1:0] idx);
    logic [1:0] x, y, t, n1;
    logic [7:0] xs, ys;   // 4 x 2-bit packed coordinates
    case (kind)
      T_I:     begin xs = {2'd3, 2'd2, 2'd1, 2'd0}; ys = {2'd2, 2'd2, 2'd2, 2'd2}; n1 = 2'd3; end
      T_O:     begin xs = {2'd1, 2'd0, 2'd1, 2'd0}; ys = {2'd1, 2'd1, 2'd0, 2'd0}; n1 = 2'd1; end
      T_T:     begin xs = {2'd2, 2'd1, 2'd0, 2'd1}; ys = {2'd1, 2'd1, 2'd1, 2'd2}; n1 = 2'd2; end
      T_J:     begin xs = {2'd2, 2'd1, 2'd0, 2'd0}; ys = {2'd1, 2'd1, 2'd1, 2'd2}; n1 = 2'd2; end
      T_L:     begin xs = {2'd2, 2'd1, 2'd0, 2'd2}; ys = {2'd1, 2'd1, 2'd1, 2'd2}; n1 = 2'd2; end
      T_S:     begin xs = {2'd1, 2'd0, 2'd2, 2'd1}; ys = {2'd1, 2'd1, 2'd2, 2'd2}; n1 = 2'd2; end
      T_Z:     begin xs = {2'd2, 2'd1, 2'd1, 2'd0}; ys = {2'd1, 2'd1, 2'd2, 2'd2}; n1 = 2'd2; end
      default: begin xs = '0; ys = '0; n1 = 2'd0; end
    endcase
    x = xs[idx*2 +: 2];
    y = ys[idx*2 +: 2];
    for (int r = 0; r < 3; r++) begin
      if (r < int'(rot)) begin
        t = x;
        x = y;
        y = n1 - t;
      end
    end
    return {x, y};
  endfunction

  // SRS wall kick k (0..4) for a rotation from rotation `from`,
  // clockwise when cw = 1. Returns {dx, dy} as two signed 3-bit values.
  function automatic logic [5:0] kick(tile_t kind, logic [1:0] from, logic cw, logic [2:0] k);
    logic signed [2:0] dx, dy;
    logic [1:0] to;
    to = cw ? from + 2'd1 : from - 2'd1;
    dx = 0;
    dy = 0;
    if (kind == T_I) begin
      // I table, pairs keyed by (from, to)
      unique case ({from, to})
        4'b00_01: case (k) 1: dx=-2; 2: dx=1; 3: begin dx=-2; dy=-1; end 4: begin dx=1; dy=2; end default: ; endcase
        4'b01_00: case (k) 1: dx=2; 2: dx=-1; 3: begin dx=2; dy=1; end 4: begin dx=-1; dy=-2; end default: ; endcase
        4'b01_10: case (k) 1: dx=-1; 2: dx=2; 3: begin dx=-1; dy=2; end 4: begin dx=2; dy=-1; end default: ; endcase
        4'b10_01: case (k) 1: dx=1; 2: dx=-2; 3: begin dx=1; dy=-2; end 4: begin dx=-2; dy=1; end default: ; endcase
        4'b10_11: case (k) 1: dx=2; 2: dx=-1; 3: begin dx=2; dy=1; end 4: begin dx=-1; dy=-2; end default: ; endcase
        4'b11_10: case (k) 1: dx=-2; 2: dx=1; 3: begin dx=-2; dy=-1; end 4: begin dx=1; dy=2; end default: ; endcase
        4'b11_00: case (k) 1: dx=1; 2: dx=-2; 3: begin dx=1; dy=-2; end 4: begin dx=-2; dy=1; end default: ; endcase
        4'b00_11: case (k) 1: dx=-1; 2: dx=2; 3: begin dx=-1; dy=2; end 4: begin dx=2; dy=-1; end default: ; endcase
        default: ;
      endcase
    end else if (kind != T_O) begin
      // J L S T Z table: the sign pattern depends on the side (R or L)
      // the rotation starts from or ends at.
      logic signed [2:0] sx;
      if (from == 2'd1 || from == 2'd3) begin
        // leaving R or L: (+-1,0) (+-1,-1) (0,+2) (+-1,+2)
        sx = (from == 2'd1) ? 3'sd1 : -3'sd1;
        case (k) 1: dx=sx; 2: begin dx=sx; dy=-1; end 3: dy=2; 4: begin dx=sx; dy=2; end default: ; endcase
      end else begin
        // entering R or L: (-+1,0) (-+1,+1) (0,-2) (-+1,-2)
        sx = (to == 2'd1) ? -3'sd1 : 3'sd1;
        case (k) 1: dx=sx; 2: begin dx=sx; dy=1; end 3: dy=-2; 4: begin dx=sx; dy=-2; end default: ; endcase
      end
    end
    return {dx, dy};
  endfunction

  // Spawn position: minos in rows 19 and 20, horizontally centred.
  function automatic piece_t spawn_piece(tile_t kind);
    piece_t p;
    p.kind = kind;
    p.rot  = 2'd0;
    case (kind)
      T_I:     begin p.x = 6'sd3; p.y = 7'sd17; end
      T_O:     begin p.x = 6'sd4; p.y = 7'sd19; end
      default: begin p.x = 6'sd3; p.y = 7'sd18; end
    endcase
    return p;
  endfunction

  function automatic logic [23:0] tile_rgb(logic [3:0] t);
    case (t)
      T_I:       return 24'h00FFFF;
      T_O:       return 24'hFFFF00;
      T_T:       return 24'hFF00FF;
      T_J:       return 24'h0000FF;
      T_L:       return 24'hFF8000;
      T_S:       return 24'h00FF00;
      T_Z:       return 24'hFF0000;
      T_GARBAGE: return 24'h808080;
      default:   return 24'h101010;
    endcase
  endfunction

endpackage
