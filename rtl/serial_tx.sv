// serial_tx: sender for one TSPIN line.
//
// `start` (while not busy) loads an encoded payload of ENC bits. On the
// following tx ticks the line carries the sync word (eight 1s) and then the
// payload, most significant bit first, one bit per tick; afterwards the
// line returns to 0 and `done` pulses for one clock. `busy` is high from
// start to done.
module serial_tx #(
  parameter int ENC = 12
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           tick,
  input  logic           start,
  input  logic [ENC-1:0] payload,
  output logic           line,
  output logic           busy,
  output logic           done
);
  localparam int N  = ENC + 8;
  localparam int CW = $clog2(N + 1);
  logic [N-1:0]  sh;
  logic [CW-1:0] left;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh   <= '0;
      left <= '0;
      line <= 1'b0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          sh   <= {8'hFF, payload};
          left <= CW'(N);
          busy <= 1'b1;
        end
      end else if (tick) begin
        if (left == 0) begin
          line <= 1'b0;
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          line <= sh[N-1];
          sh   <= sh << 1;
          left <= left - 1'b1;
        end
      end
    end
  end
endmodule
