// input_handler: conditions one button into single-cycle action pulses.
//
// The raw level passes a two-flop synchronizer. It must then stay asserted
// for HOLD_MIN (63) consecutive cycles to count as a press, which filters the
// short spurious pulses that cable cross-talk produces. A qualified press
// fires one pulse as soon as the shared cooldown (`block`) is clear; if the
// button stays held and REPEAT is set, it fires again after DAS_CYCLES and
// then every ARR_CYCLES (delayed auto shift). Releasing the button returns
// the FSM to WAIT_PRESS. HOLD_MIN is the design's figure; the DAS and repeat
// periods (170 ms and 50 ms at 50 MHz) are this design's choice.
// Timing: with no cooldown the first pulse is registered 3 + HOLD_MIN
// clock edges after the button level rises (66); repeats follow exactly
// DAS_CYCLES after it and ARR_CYCLES after each other.
module input_handler #(
  parameter int HOLD_MIN   = 63,
  parameter int DAS_CYCLES = 8_500_000,
  parameter int ARR_CYCLES = 2_500_000,
  parameter bit REPEAT     = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic raw,     // active high button level
  input  logic block,   // global cooldown in progress
  output logic pulse
);
  localparam int CW = $clog2((DAS_CYCLES > ARR_CYCLES ? DAS_CYCLES : ARR_CYCLES) + HOLD_MIN + 2);

  typedef enum logic [1:0] {WAIT_PRESS, FIRE, DELAY, HELD} ih_state_t;
  ih_state_t st;
  logic [1:0]    sync;
  logic [CW-1:0] cnt;
  logic          second;  // next repeat uses ARR instead of DAS

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync   <= '0;
      st     <= WAIT_PRESS;
      cnt    <= '0;
      pulse  <= 1'b0;
      second <= 1'b0;
    end else begin
      sync  <= {sync[0], raw};
      pulse <= 1'b0;
      if (!sync[1]) begin
        st  <= WAIT_PRESS;
        cnt <= '0;
      end else begin
        unique case (st)
          WAIT_PRESS:
            if (cnt >= CW'(HOLD_MIN - 1)) begin
              st     <= FIRE;
              second <= 1'b0;
            end else cnt <= cnt + 1'b1;
          FIRE:
            if (!block) begin
              pulse  <= 1'b1;
              cnt    <= CW'(1);  // repeats are exactly DAS_CYCLES / ARR_CYCLES apart
              st     <= REPEAT ? DELAY : HELD;
            end
          DELAY: begin
            if (cnt >= (second ? CW'(ARR_CYCLES - 1) : CW'(DAS_CYCLES - 1))) begin
              st     <= FIRE;
              second <= 1'b1;
            end else cnt <= cnt + 1'b1;
          end
          default: ;  // HELD: wait for release
        endcase
      end
    end
  end
endmodule
