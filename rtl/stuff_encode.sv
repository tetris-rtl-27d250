// stuff_encode: line code of the TSPIN link, encoder side.
//
// Copies RAW payload bits (most significant first) and inserts a 0 after
// every K of them, giving RAW + RAW/K bits. No run of more than K ones can
// then appear, so for K < 8 the eight-ones sync word is unique on the wire.
// Combinational.
module stuff_encode #(
  parameter int RAW = 8,
  parameter int K   = 2,
  parameter int ENC = RAW + RAW / K
) (
  input  logic [RAW-1:0] din,
  output logic [ENC-1:0] dout
);
  always_comb begin
    int o;
    dout = '0;
    o = ENC - 1;
    for (int i = RAW - 1; i >= 0; i--) begin
      dout[o] = din[i];
      o = o - 1;
      if ((RAW - i) % K == 0) begin
        dout[o] = 1'b0;
        o = o - 1;
      end
    end
  end
endmodule
