// tb_tetris_top_full: full-size testbench of one tetris_top board with
// every parameter at its default (real timing: 50 MHz clock, 63-cycle
// button filter, 8.5 M-cycle DAS, 0.5 s lock delay, 1 s gravity, 500-cycle
// TSPIN bit time). No second board is connected. Over about five frames it
// checks:
//   - VGA: hsync every 1040 clocks, vsync every 1040 x 666 = 692640 clocks
//     (72.19 Hz), 800 x 600 visible pixels per frame;
//   - a Hard drop press on the start screen starts the sprint;
//   - the falling piece is drawn: pixels of its colour appear in the next
//     frame;
//   - a Right press moves the piece one column, 66 clocks after the press
//     at the earliest and before the next frame;
//   - every input-to-display latency measured on chip is at most two frame
//     times, and the measurements are counted;
//   - the music DAC is clocked every 1000 clocks (50 kHz);
//   - the master drives the TSPIN bit clock (one period per 500 clocks).
module tb_tetris_top_full;
  import tetris_pkg::*;
  localparam int FRAME = 1040 * 666;
  logic clk = 0, rst_n = 0;
  logic [7:0] btn_n = 8'hFF;
  logic [7:0] r, g, b, dac;
  logic hs, vs, bl, nclk, th, dclk;
  logic [3:0] td;
  sys_state_t ss;
  logic [23:0] lat_last, lat_worst;
  logic [15:0] lat_cnt;
  int checks = 0, failures = 0;
  longint cyc = 0;

  tetris_top dut (
    .clk, .rst_n, .btn_n, .sw_frames(1'b1), .sw_music(1'b1),
    .vga_r(r), .vga_g(g), .vga_b(b), .vga_hs(hs), .vga_vs(vs), .vga_blank_n(bl),
    .net_clk_o(nclk), .net_clk_i(1'b0), .net_tx_h(th), .net_tx_d(td), .net_rx_h(1'b0), .net_rx_d(4'h0),
    .dac_data(dac), .dac_clk(dclk), .sys_state(ss),
    .lat_last, .lat_worst, .lat_count(lat_cnt));

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // timing monitors
  logic hs_q = 0, vs_q = 0, dclk_q = 0, nclk_q = 0;
  longint t_hs = -1, t_vs = -1, t_dclk = -1, t_nclk = -1;
  int n_hs = 0, n_vs = 0, n_dclk = 0, n_nclk = 0, bad_hs = 0, bad_vs = 0, bad_dclk = 0, bad_nclk = 0;
  int vis = 0, vis_frame = 0, colour_px = 0;
  logic [23:0] want_rgb = 24'h000001;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    hs_q <= hs; vs_q <= vs; dclk_q <= dclk; nclk_q <= nclk;
    if (rst_n) begin
      if (hs && !hs_q) begin
        if (t_hs >= 0 && cyc - t_hs != 1040) bad_hs++;
        t_hs = cyc; n_hs++;
      end
      if (vs && !vs_q) begin
        if (t_vs >= 0 && cyc - t_vs != FRAME) bad_vs++;
        t_vs = cyc; n_vs++;
        vis_frame = vis; vis = 0;
      end
      if (bl) begin
        vis++;
        if ({r, g, b} == want_rgb) colour_px++;
      end
      if (dclk && !dclk_q) begin
        if (t_dclk >= 0 && cyc - t_dclk != 1000) bad_dclk++;
        t_dclk = cyc; n_dclk++;
      end
      if (nclk && !nclk_q) begin
        if (t_nclk >= 0 && cyc - t_nclk != 500) bad_nclk++;
        t_nclk = cyc; n_nclk++;
      end
    end
  end

  initial begin
    repeat (8_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0;
    int x0, frames0;
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (FRAME + 5000) @(negedge clk);
    check(ss == S_START_SCREEN, "start screen after reset");
    // start the sprint
    btn_n[7] = 0; repeat (1000) @(negedge clk); btn_n[7] = 1;
    repeat (200) @(negedge clk);
    check(ss == S_SPRINT_MODE, "hard drop starts the sprint");
    repeat (500) @(negedge clk);
    want_rgb = tile_rgb(dut.u_game.u_core.active.kind);
    // wait for one full frame that began after the spawn
    @(posedge dut.vsync_start);
    colour_px = 0;
    @(posedge dut.vsync_start);
    check(colour_px >= 4 * 16, $sformatf("falling piece drawn (%0d pixels of its colour)", colour_px));
    // a Right press
    x0 = int'(dut.u_game.u_core.active.x);
    @(negedge clk) btn_n[4] = 0;
    t0 = cyc;
    while (int'(dut.u_game.u_core.active.x) == x0 && cyc - t0 < FRAME) @(negedge clk);
    check(int'(dut.u_game.u_core.active.x) == x0 + 1, "Right moves the piece one column");
    check(cyc - t0 >= 66 && cyc - t0 < 200, $sformatf("move applied %0d clocks after the press", cyc - t0));
    repeat (1000) @(negedge clk);
    btn_n[4] = 1;
    repeat (2 * FRAME + 2000) @(negedge clk);
    check(lat_cnt >= 2, $sformatf("%0d latency measurements", lat_cnt));
    check(lat_worst <= 24'(2 * FRAME) && lat_worst > 0, $sformatf("worst latency %0d clocks (%0.2f frames)", lat_worst, real'(lat_worst) / FRAME));
    check(vis_frame == 800 * 600, $sformatf("%0d visible pixels per frame", vis_frame));
    check(n_hs > 2000 && bad_hs == 0, "hsync every 1040 clocks");
    check(n_vs >= 4 && bad_vs == 0, "vsync every 692640 clocks");
    check(n_dclk > 2000 && bad_dclk == 0, "DAC sample clock 50 kHz");
    check(n_nclk > 2000 && bad_nclk == 0, "TSPIN bit clock 100 kHz");
    $display("frames %0d, latency last %0d worst %0d", n_vs, lat_last, lat_worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
