// note_lut: note number to square-wave half period.
//
// A 128-entry ROM indexed by MIDI note number. Entry n holds the number of
// 50 MHz clock cycles in half a period of that note,
//   round(50e6 / (2 * 440 * 2^((n - 69) / 12))),
// and entry 0 is 0, meaning silence. The table is loaded from
// rtl/note_halfperiod.hex; the read is registered (one clock latency) so
// that it maps onto block RAM.
module note_lut (
  input  logic        clk,
  input  logic [6:0]  note,
  output logic [23:0] half_period
);
  logic [23:0] rom [128];
  initial $readmemh("rtl/note_halfperiod.hex", rom);
  always_ff @(posedge clk) half_period <= rom[note];
endmodule
