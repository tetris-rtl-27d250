// net_clock: bit timing of the TSPIN link.
//
// A phase counter divides the board clock by DIV (500: 100 kHz at 50 MHz).
// tick_tx pulses at phase 0, where senders change their lines, and tick_rx
// at phase DIV/2, where receivers sample, in the middle of the bit.
// The master drives clk_out: low for phases 0..DIV/2-1 and high after, so
// its falling edge marks phase 0. The slave does not use the incoming clock
// as a clock: it runs its own counter and, on every falling edge of the
// synchronized clk_in, reloads the counter with the phase the master has
// reached by then (ALIGN, the synchronizer delay). Both boards thus share
// bit boundaries while a glitch on clk_in cannot clock any logic. Both
// parties use the same module; IS_MASTER selects the role.
module net_clock #(
  parameter int DIV       = 500,
  parameter bit IS_MASTER = 1'b1,
  parameter int ALIGN     = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clk_in,    // slave: clock line from the master
  output logic clk_out,   // master: clock line to the slave
  output logic tick_tx,
  output logic tick_rx
);
  localparam int PW = $clog2(DIV);
  logic [PW-1:0] phase;
  logic [2:0]    s;
  logic          fall;

  assign fall = !IS_MASTER && s[2] && !s[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase   <= '0;
      s       <= '0;
      clk_out <= 1'b1;
    end else begin
      s <= {s[1:0], clk_in};
      if (fall)
        phase <= PW'(ALIGN);
      else
        phase <= (phase == PW'(DIV - 1)) ? '0 : phase + 1'b1;
      // registered clock output, high in the second half of the bit
      clk_out <= IS_MASTER && (phase >= PW'(DIV / 2 - 1)) && (phase != PW'(DIV - 1));
    end
  end

  assign tick_tx = (phase == '0);
  assign tick_rx = (phase == PW'(DIV / 2));
endmodule
