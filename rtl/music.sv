// music: background music synthesizer ("Korobeiniki") for the audio DAC.
//
// The song is a ROM of SONG_LEN eighth-note slots, each {melody note, bass
// note} (MIDI numbers, 0 = rest), loaded from rtl/korobeiniki.hex. A slot
// counter advances every SLOT_CYCLES clocks and wraps to loop the song.
// Two wave_gen instances turn the melody and bass notes into square waves,
// which are mixed by a weighted sum: W_MEL when the melody wave is high
// plus W_BASS when the bass wave is high (at most 255). A SAMPLE_DIV
// divider makes the 50 kHz sample clock: on each sample edge the 8-bit mix
// is latched onto dac_data and held until the next one, and dac_clk carries
// the sample clock. `enable` low silences the output and restarts the song.
// The song transcription, tempo and weights are this design's choices.
module music #(
  parameter int SONG_LEN    = 64,
  parameter int SLOT_CYCLES = 10_000_000,
  parameter int SAMPLE_DIV  = 1000,
  parameter logic [7:0] W_MEL  = 8'd160,
  parameter logic [7:0] W_BASS = 8'd95
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,
  output logic [7:0] dac_data,
  output logic       dac_clk,
  output logic [$clog2(SONG_LEN)-1:0] pos
);
  localparam int SW = $clog2(SLOT_CYCLES + 1);
  localparam int DW = $clog2(SAMPLE_DIV + 1);

  logic [15:0] song [SONG_LEN];
  initial $readmemh("rtl/korobeiniki.hex", song);

  logic [15:0]   slot;
  logic [SW-1:0] scnt;
  logic [DW-1:0] dcnt;
  logic          mel_w, bass_w;
  logic [8:0]    mix;

  always_ff @(posedge clk) slot <= song[pos];

  wave_gen u_mel  (.clk, .rst_n, .note(enable ? slot[14:8] : 7'd0), .wave(mel_w));
  wave_gen u_bass (.clk, .rst_n, .note(enable ? slot[6:0]  : 7'd0), .wave(bass_w));

  assign mix = (mel_w ? 9'(W_MEL) : 9'd0) + (bass_w ? 9'(W_BASS) : 9'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos <= '0; scnt <= '0; dcnt <= '0; dac_data <= '0; dac_clk <= 1'b0;
    end else begin
      if (!enable) begin
        pos  <= '0;
        scnt <= '0;
      end else if (scnt == SW'(SLOT_CYCLES - 1)) begin
        scnt <= '0;
        pos  <= (pos == ($clog2(SONG_LEN))'(SONG_LEN - 1)) ? '0 : pos + 1'b1;
      end else begin
        scnt <= scnt + 1'b1;
      end
      if (dcnt == DW'(SAMPLE_DIV - 1)) begin
        dcnt     <= '0;
        dac_data <= (mix > 9'd255) ? 8'd255 : mix[7:0];
        dac_clk  <= 1'b1;
      end else begin
        dcnt <= dcnt + 1'b1;
        if (dcnt == DW'(SAMPLE_DIV / 2 - 1)) dac_clk <= 1'b0;
      end
    end
  end

  logic unused;
  assign unused = ^{slot[15], slot[7]};
endmodule
