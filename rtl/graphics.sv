// graphics: the Graphics subsystem, SVGA output of one board.
//
// A vga_controller scans 800x600 @ 72 Hz. Independent pixel drivers each
// draw one part of the screen and raise a one-hot active signal there; which
// drivers are enabled follows the screen state of the system FSM:
//   start / ready screens   menu_driver
//   sprint and battle       own hold, playfield and preview, timer, lines;
//                           in battle also the opponent's hold, playfield
//                           and preview received over the network
//   won / lost              game_end_driver with the game's statistics
//   any screen              frames_driver overlay when sw_frames is on
// pixel_mux merges them. Colour and syncs are registered once, so the VGA
// outputs lag the counters by one clock. frame_start / vsync_start are
// passed on for the latency counter and the once-per-frame network update.
// Screen layout (positions, 16-pixel tiles, 8-pixel preview tiles) is this
// design's choice.
module graphics
  import tetris_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  sys_state_t  sys_state,
  input  logic        sw_frames,
  input  vfield_t     field,
  input  tile_t       hold_piece,
  input  logic [5:0][3:0] preview,
  input  logic [4:0]  hours,
  input  logic [5:0]  minutes,
  input  logic [5:0]  seconds,
  input  logic [9:0]  millis,
  input  logic [9:0]  lines_cleared,
  input  logic [9:0]  lines_sent,
  input  vfield_t     opp_field,
  input  tile_t       opp_hold,
  input  logic [5:0][3:0] opp_preview,
  output logic [7:0]  vga_r,
  output logic [7:0]  vga_g,
  output logic [7:0]  vga_b,
  output logic        vga_hs,
  output logic        vga_vs,
  output logic        vga_blank_n,
  output logic        frame_start,
  output logic        vsync_start,
  output logic [16:0] frames
);
  localparam int ND = 11;

  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic        hs, vs, blank;
  logic [ND-1:0]       act;
  logic [ND-1:0][23:0] col;
  logic [23:0]         pix;

  vga_controller u_vga (
    .clk, .rst_n, .hcount, .vcount, .hsync(hs), .vsync(vs), .blank,
    .frame_start, .vsync_start
  );

  logic playing, battle, ended, menu;
  assign battle  = (sys_state == S_MP_MODE);
  assign playing = (sys_state == S_SPRINT_MODE) || battle;
  assign ended   = (sys_state == S_GAME_WON) || (sys_state == S_GAME_LOST);
  assign menu    = (sys_state == S_START_SCREEN) || (sys_state == S_MP_READY);

  playfield_driver #(.X0(100), .Y0(60)) u_pf (
    .en(playing), .hcount, .vcount, .field, .active(act[0]), .rgb(col[0]));
  hold_driver #(.X0(40), .Y0(60)) u_hold (
    .en(playing), .hcount, .vcount, .piece(hold_piece), .active(act[1]), .rgb(col[1]));
  next_driver #(.X0(270), .Y0(60)) u_next (
    .en(playing), .hcount, .vcount, .preview, .active(act[2]), .rgb(col[2]));
  timer_driver #(.X(100), .Y(400)) u_timer (
    .en(playing), .hcount, .vcount, .hours, .minutes, .seconds, .millis,
    .active(act[3]), .rgb(col[3]));
  lines_driver #(.X(100), .Y(430)) u_lines (
    .en(playing), .show_sent(battle), .hcount, .vcount, .cleared(lines_cleared),
    .sent(lines_sent), .active(act[4]), .rgb(col[4]));
  playfield_driver #(.X0(500), .Y0(60)) u_opp_pf (
    .en(battle), .hcount, .vcount, .field(opp_field), .active(act[5]), .rgb(col[5]));
  hold_driver #(.X0(440), .Y0(60)) u_opp_hold (
    .en(battle), .hcount, .vcount, .piece(opp_hold), .active(act[6]), .rgb(col[6]));
  next_driver #(.X0(670), .Y0(60)) u_opp_next (
    .en(battle), .hcount, .vcount, .preview(opp_preview), .active(act[7]), .rgb(col[7]));
  menu_driver u_menu (
    .start_screen(sys_state == S_START_SCREEN), .ready_screen(sys_state == S_MP_READY),
    .hcount, .vcount, .active(act[8]), .rgb(col[8]));
  game_end_driver u_end (
    .en(ended), .won(sys_state == S_GAME_WON), .battle(1'b1), .hcount, .vcount,
    .hours, .minutes, .seconds, .millis, .cleared(lines_cleared), .sent(lines_sent),
    .active(act[9]), .rgb(col[9]));
  frames_driver u_frames (
    .clk, .rst_n, .frame_start, .en(sw_frames), .hcount, .vcount, .frames,
    .active(act[10]), .rgb(col[10]));

  pixel_mux #(.N(ND)) u_mux (.active(act), .rgb_in(col), .rgb(pix));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {vga_r, vga_g, vga_b} <= '0;
      vga_hs      <= 1'b0;
      vga_vs      <= 1'b0;
      vga_blank_n <= 1'b0;
    end else begin
      {vga_r, vga_g, vga_b} <= blank ? 24'h0 : pix;
      vga_hs      <= hs;
      vga_vs      <= vs;
      vga_blank_n <= !blank;
    end
  end

  logic unused;
  assign unused = menu;
endmodule
