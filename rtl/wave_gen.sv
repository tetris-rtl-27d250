// wave_gen: square wave at the frequency of a note.
//
// The note number is looked up in note_lut to get the half period in clock
// cycles. A counter counts clock cycles up to the half period and then
// inverts the output, giving a square wave of the note's frequency. A half
// period of 0 (note 0) silences the output, and a change of note restarts
// the count.
module wave_gen (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [6:0] note,
  output logic       wave
);
  logic [23:0] half, cnt;
  logic [6:0]  note_q;

  note_lut u_lut (.clk, .note, .half_period(half));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      wave   <= 1'b0;
      note_q <= '0;
    end else begin
      note_q <= note;
      if (note != note_q || half == '0) begin
        cnt  <= '0;
        wave <= 1'b0;
      end else if (cnt >= half - 24'd1) begin
        cnt  <= '0;
        wave <= !wave;
      end else begin
        cnt <= cnt + 24'd1;
      end
    end
  end
endmodule
