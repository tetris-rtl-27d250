// tetris_top: one board of the two-player FPGA Tetris.
//
// Input arrives from an 8-button arcade controller (active low), is
// conditioned by controller_if into one-cycle actions, and drives
// game_logic, which precomputes every possible next state so that an
// action is reflected in the game state within a few dozen cycles. The
// graphics subsystem draws the state on an 800x600 @ 72 Hz SVGA screen;
// a latency_counter measures each input to the vertical sync that ends the
// first frame showing it. The TSPIN link (net_stack) exchanges game data
// with the second board once per frame for battle mode, and `music` plays
// the background tune on an 8-bit external DAC sampled at 50 kHz.
//
// Interfaces: btn_n (8 buttons, 0 = pressed), sw_frames (frame counter
// overlay), sw_music (music on), the VGA colour/sync pins, the TSPIN pins
// (clock out/in, handshake and four data lines each way) and the DAC
// pins. The latency measurements are brought out for observation. All
// logic runs on the single 50 MHz clock `clk`; rst_n is the active-low
// reset. Parameters other than IS_MASTER only shorten times for
// simulation; their defaults are the real values.
module tetris_top
  import tetris_pkg::*;
#(
  parameter bit IS_MASTER      = 1'b1,
  parameter int HOLD_MIN       = 63,
  parameter int DAS_CYCLES     = 8_500_000,
  parameter int ARR_CYCLES     = 2_500_000,
  parameter int LOCK_CYCLES    = 25_000_000,
  parameter int GRAVITY_CYCLES = 50_000_000,
  parameter int GARBAGE_DELAY  = 50_000_000,
  parameter int CYC_PER_MS     = 50_000,
  parameter int NET_DIV        = 500,
  parameter int SLOT_CYCLES    = 10_000_000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  btn_n,
  input  logic        sw_frames,
  input  logic        sw_music,
  output logic [7:0]  vga_r,
  output logic [7:0]  vga_g,
  output logic [7:0]  vga_b,
  output logic        vga_hs,
  output logic        vga_vs,
  output logic        vga_blank_n,
  output logic        net_clk_o,
  input  logic        net_clk_i,
  output logic        net_tx_h,
  output logic [3:0]  net_tx_d,
  input  logic        net_rx_h,
  input  logic [3:0]  net_rx_d,
  output logic [7:0]  dac_data,
  output logic        dac_clk,
  output sys_state_t  sys_state,
  output logic [23:0] lat_last,
  output logic [23:0] lat_worst,
  output logic [15:0] lat_count
);
  actions_t    act;
  logic        game_start, mp_ready, lost, applied, attack_valid, clr_valid;
  logic [3:0]  attack, pending;
  clear_t      clr;
  vfield_t     vfield, opp_vfield;
  tile_t       hold_piece;
  logic [5:0][3:0] preview, opp_pq;
  logic [4:0]  hours;
  logic [5:0]  minutes, seconds;
  logic [9:0]  millis, lines_cleared, lines_sent;
  logic        net_start, net_won, opp_update;
  logic [3:0]  opp_gbg, opp_hld;
  logic [799:0] opp_pfd;
  logic [2:0]  ctrl_state;
  logic [15:0] resends, dups;
  logic        frame_start, vsync_start, lat_done;
  logic [16:0] frames;
  logic [5:0]  song_pos;

  controller_if #(
    .COOLDOWN(15), .HOLD_MIN(HOLD_MIN), .DAS_CYCLES(DAS_CYCLES), .ARR_CYCLES(ARR_CYCLES)
  ) u_ctrl (.clk, .rst_n, .btn_n, .act);

  game_logic #(
    .LOCK_CYCLES(LOCK_CYCLES), .GRAVITY_CYCLES(GRAVITY_CYCLES),
    .GARBAGE_DELAY(GARBAGE_DELAY), .CYC_PER_MS(CYC_PER_MS), .SPRINT_LINES(40)
  ) u_game (
    .clk, .rst_n, .act, .net_start, .net_won,
    .opp_gbg_valid(opp_update), .opp_gbg,
    .sys_state, .game_start, .mp_ready, .lost, .vfield, .hold_piece, .preview,
    .hours, .minutes, .seconds, .millis, .lines_cleared, .lines_sent,
    .attack_valid, .attack, .applied, .clr_valid, .clr, .pending
  );

  assign opp_vfield = vfield_t'(opp_pfd);

  graphics u_gfx (
    .clk, .rst_n, .sys_state, .sw_frames, .field(vfield), .hold_piece, .preview,
    .hours, .minutes, .seconds, .millis, .lines_cleared, .lines_sent,
    .opp_field(opp_vfield), .opp_hold(tile_t'(opp_hld)), .opp_preview(opp_pq),
    .vga_r, .vga_g, .vga_b, .vga_hs, .vga_vs, .vga_blank_n,
    .frame_start, .vsync_start, .frames
  );

  latency_counter #(.W(24)) u_lat (
    .clk, .rst_n, .start(act != '0), .frame_start, .vsync_start,
    .last(lat_last), .worst(lat_worst), .count(lat_count), .done(lat_done)
  );

  net_stack #(.IS_MASTER(IS_MASTER), .DIV(NET_DIV)) u_net (
    .clk, .rst_n, .net_clk_o, .net_clk_i, .tx_h(net_tx_h), .tx_d(net_tx_d),
    .rx_h(net_rx_h), .rx_d(net_rx_d),
    .mp_ready, .lost, .update_data(vsync_start), .hld(hold_piece), .pq(preview),
    .pfd(800'(vfield)), .garbage_add(attack_valid && attack != 0), .garbage(attack),
    .game_start(net_start), .game_won(net_won), .update_opponent_data(opp_update),
    .opp_gbg, .opp_hld, .opp_pq, .opp_pfd, .ctrl_state, .resends, .dups
  );

  music #(.SONG_LEN(64), .SLOT_CYCLES(SLOT_CYCLES), .SAMPLE_DIV(1000)) u_music (
    .clk, .rst_n, .enable(sw_music), .dac_data, .dac_clk, .pos(song_pos)
  );

  logic unused;
  assign unused = ^{applied, clr_valid, clr, pending, ctrl_state, resends, dups,
                    lat_done, frames, song_pos};
endmodule
