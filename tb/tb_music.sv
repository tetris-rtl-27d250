// tb_music: self-checking testbench for the music blocks: note_lut,
// wave_gen and music.
//   note_lut  every one of the 128 entries is compared with
//             round(50e6 / (2 * 440 * 2^((n - 69) / 12))), entry 0 with 0,
//             one clock after the address is applied.
//   wave_gen  for a set of notes the output must toggle exactly every
//             half-period clocks; note 0 must keep the output low.
//   music     (SLOT_CYCLES scaled to 300000) the DAC clock must rise every
//             SAMPLE_DIV = 1000 clocks (50 kHz at 50 MHz), the song position
//             must advance once per slot and wrap after SONG_LEN slots, each
//             DAC sample must be one of the four mix levels, the melody wave
//             must run at the frequency of the song ROM's melody note, and
//             `enable` low must silence the output and rewind the song.
module tb_music;
  localparam int SLOT = 300000, SDIV = 1000, LEN = 64;
  logic clk = 0, rst_n = 0, enable = 0;
  logic [6:0] lut_note = 0, wg_note = 0;
  logic [23:0] lut_half;
  logic wave;
  logic [7:0] dac_data;
  logic dac_clk;
  logic [5:0] pos;
  logic [15:0] song [LEN];
  int checks = 0, failures = 0;
  longint cyc = 0;

  note_lut lut (.clk, .note(lut_note), .half_period(lut_half));
  wave_gen wg (.clk, .rst_n, .note(wg_note), .wave);
  music #(.SONG_LEN(LEN), .SLOT_CYCLES(SLOT), .SAMPLE_DIV(SDIV)) dut (.clk, .rst_n, .enable, .dac_data, .dac_clk, .pos);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic int ref_half(int n);
    if (n == 0) return 0;
    return $rtoi(50.0e6 / (2.0 * 440.0 * (2.0 ** ((n - 69) / 12.0))) + 0.5);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // DAC sample rate and sample values
  longint last_dclk = -1;
  int n_samples = 0, bad_rate = 0, bad_level = 0;
  logic dclk_q = 0;
  always @(posedge clk) begin
    dclk_q <= dac_clk;
    if (rst_n && dac_clk && !dclk_q) begin
      if (last_dclk >= 0 && cyc - last_dclk != SDIV) bad_rate++;
      last_dclk = cyc;
      n_samples++;
      if (!(dac_data inside {8'd0, 8'd95, 8'd160, 8'd255})) bad_level++;
    end
  end

  initial begin
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bad, t0, t1, mel, p0;
    $readmemh("rtl/korobeiniki.hex", song);
    repeat (3) @(negedge clk);
    rst_n = 1;
    // note_lut
    bad = 0;
    for (int n = 0; n < 128; n++) begin
      lut_note = 7'(n);
      @(negedge clk);
      checks++;
      if (int'(lut_half) != ref_half(n)) begin
        bad++; failures++;
        if (bad < 5) $display("FAIL: note %0d half period %0d, expected %0d", n, lut_half, ref_half(n));
      end
    end
    // wave_gen
    for (int k = 0; k < 5; k++) begin
      int n, h;
      n = (k == 0) ? 81 : (k == 1) ? 69 : (k == 2) ? 100 : (k == 3) ? 120 : 64;
      h = ref_half(n);
      wg_note = 7'(n);
      @(posedge wave);
      t0 = int'(cyc);
      for (int j = 0; j < 4; j++) begin
        @(wave);
        t1 = int'(cyc);
        check(t1 - t0 == h, $sformatf("note %0d toggles after %0d clocks, expected %0d", n, t1 - t0, h));
        t0 = t1;
      end
    end
    wg_note = 0;
    repeat (5) @(negedge clk);
    t0 = 0;
    repeat (200000) begin @(negedge clk); if (wave) t0++; end
    check(t0 == 0, "note 0 is silent");
    // music
    check(dac_data == 0 && pos == 0, "disabled music is silent at position 0");
    enable = 1;
    for (int s = 0; s < 4; s++) begin
      p0 = pos;
      mel = song[p0][14:8];
      // measure the melody period in the middle of the slot
      repeat (SLOT / 4) @(negedge clk);
      if (mel != 0 && ref_half(mel) * 6 < SLOT / 2) begin
        @(posedge dut.mel_w); t0 = int'(cyc);
        @(posedge dut.mel_w); t1 = int'(cyc);
        check(t1 - t0 == 2 * ref_half(mel), $sformatf("slot %0d melody period %0d, note %0d", p0, t1 - t0, mel));
      end
      while (pos == 6'(p0)) @(negedge clk);
      check(pos == 6'(p0 + 1), "position advances by one slot");
    end
    // slot length
    t0 = int'(cyc);
    p0 = pos;
    while (pos == 6'(p0)) @(negedge clk);
    check(int'(cyc) - t0 == SLOT, $sformatf("slot lasts %0d clocks", int'(cyc) - t0));
    // wrap: force no state, just wait for the song to loop
    while (pos != 0) @(negedge clk);
    check(1, "song wraps to position 0");
    check(n_samples > 1000 && bad_rate == 0, $sformatf("%0d DAC samples, %0d at a wrong interval", n_samples, bad_rate));
    check(bad_level == 0, "every sample is one of the mix levels");
    enable = 0;
    repeat (3 * SDIV) @(negedge clk);
    check(dac_data == 0 && pos == 0, "enable low silences and rewinds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
