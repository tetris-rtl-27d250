// lfsr31: 31-bit Galois linear feedback shift register.
//
// Shifts right once per enabled cycle; when the bit shifted out is 1 the
// register is XOR-ed with the feedback mask of x^31 + x^28 + 1, a maximal
// length polynomial (period 2^31 - 1). bit_out is the bit shifted out. The
// register never holds zero: a zero SEED is replaced by 1. The design uses
// several of these, one per random bit it needs; the polynomial is this
// design's choice.
module lfsr31 #(
  parameter logic [30:0] SEED = 31'h1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  output logic        bit_out,
  output logic [30:0] state
);
  localparam logic [30:0] TAPS = 31'h4800_0000;  // bits 30 and 27
  localparam logic [30:0] INIT = (SEED == '0) ? 31'h1 : SEED;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      state <= INIT;
    else if (en)
      state <= state[0] ? ((state >> 1) ^ TAPS) : (state >> 1);
  end
  assign bit_out = state[0];
endmodule
