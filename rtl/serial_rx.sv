// serial_rx: receiver for one TSPIN line.
//
// The line is synchronized with two flops and sampled on each rx tick.
// While hunting, the last eight samples are kept; when all are 1 the sync
// word has been seen (`sync` pulses) and the next ENC samples are shifted
// in as the encoded payload, after which `valid` pulses for one clock with
// the payload on `data`, and hunting starts again from an empty window.
// `drop` drops a packet in progress.
module serial_rx #(
  parameter int ENC = 12
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           tick,
  input  logic           line_in,
  input  logic           drop,
  output logic           sync,
  output logic           valid,
  output logic [ENC-1:0] data,
  output logic           receiving
);
  localparam int CW = $clog2(ENC + 1);
  logic [1:0]    s;
  logic [7:0]    win;
  logic [CW-1:0] left;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s <= '0; win <= '0; left <= '0; data <= '0;
      sync <= 1'b0; valid <= 1'b0; receiving <= 1'b0;
    end else begin
      s     <= {s[0], line_in};
      sync  <= 1'b0;
      valid <= 1'b0;
      if (drop) begin
        receiving <= 1'b0;
        win       <= '0;
      end else if (tick) begin
        if (!receiving) begin
          if ({win[6:0], s[1]} == 8'hFF) begin
            receiving <= 1'b1;
            left      <= CW'(ENC);
            sync      <= 1'b1;
            win       <= '0;
          end else begin
            win <= {win[6:0], s[1]};
          end
        end else begin
          data <= {data[ENC-2:0], s[1]};
          left <= left - 1'b1;
          if (left == CW'(1)) begin
            receiving <= 1'b0;
            valid     <= 1'b1;
          end
        end
      end
    end
  end
endmodule
