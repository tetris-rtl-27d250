// stuff_decode: line code of the TSPIN link, decoder side.
//
// Drops the 0 that the encoder inserted after every K payload bits and
// returns the RAW payload bits. `error` is high when an inserted position
// holds a 1, i.e. the packet was damaged on the wire; the receivers report
// it but, like the original link, carry no error correction.
// Combinational.
module stuff_decode #(
  parameter int RAW = 8,
  parameter int K   = 2,
  parameter int ENC = RAW + RAW / K
) (
  input  logic [ENC-1:0] din,
  output logic [RAW-1:0] dout,
  output logic           error
);
  always_comb begin
    int o;
    dout  = '0;
    error = 1'b0;
    o = ENC - 1;
    for (int i = RAW - 1; i >= 0; i--) begin
      dout[i] = din[o];
      o = o - 1;
      if ((RAW - i) % K == 0) begin
        error = error | din[o];
        o = o - 1;
      end
    end
  end
endmodule
