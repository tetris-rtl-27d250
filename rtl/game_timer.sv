// game_timer: elapsed game time as hours, minutes, seconds, milliseconds.
//
// A prescaler of CYC_PER_MS cycles (50 000 at 50 MHz) advances the
// millisecond count; the fields roll over at 1000 ms, 60 s and 60 min.
// `clear` zeroes everything, `run` lets the time advance. The display
// driver turns these binary fields into digits.
module game_timer #(
  parameter int CYC_PER_MS = 50_000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       run,
  output logic [4:0] hours,
  output logic [5:0] minutes,
  output logic [5:0] seconds,
  output logic [9:0] millis
);
  localparam int PW = $clog2(CYC_PER_MS + 1);
  logic [PW-1:0] pre;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre <= '0; hours <= '0; minutes <= '0; seconds <= '0; millis <= '0;
    end else if (clear) begin
      pre <= '0; hours <= '0; minutes <= '0; seconds <= '0; millis <= '0;
    end else if (run) begin
      if (pre == PW'(CYC_PER_MS - 1)) begin
        pre <= '0;
        if (millis == 10'd999) begin
          millis <= '0;
          if (seconds == 6'd59) begin
            seconds <= '0;
            if (minutes == 6'd59) begin
              minutes <= '0;
              hours   <= hours + 5'd1;
            end else minutes <= minutes + 6'd1;
          end else seconds <= seconds + 6'd1;
        end else millis <= millis + 10'd1;
      end else pre <= pre + 1'b1;
    end
  end
endmodule
