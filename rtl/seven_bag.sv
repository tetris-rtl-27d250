// seven_bag: tetromino generator with the seven-bag rule.
//
// Three free-running 31-bit Galois LFSRs each contribute one bit; the 3-bit
// value names a tetromino (1..7 = I O T J L S Z). A value is accepted when it
// is 1..7 and that piece has not yet been drawn from the current bag;
// otherwise the generator tries again on the next cycle. When all seven have
// been drawn the bag is refilled. Because the LFSRs run every cycle, the
// sequence depends on when pieces are taken. Interface: valid/ready; a
// piece moves when both are high. The rejection scheme is this design's
// reading of "each LFSR generates a bit".
module seven_bag
  import tetris_pkg::*;
#(
  parameter logic [30:0] SEED0 = 31'h1234_5678,
  parameter logic [30:0] SEED1 = 31'h0BAD_F00D,
  parameter logic [30:0] SEED2 = 31'h3C0F_FEE5
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  ready,
  output logic  valid,
  output tile_t piece
);
  logic [2:0]  r;
  logic [30:0] s0, s1, s2;
  logic [7:1]  drawn;

  lfsr31 #(.SEED(SEED0)) u_l0 (.clk, .rst_n, .en(1'b1), .bit_out(r[0]), .state(s0));
  lfsr31 #(.SEED(SEED1)) u_l1 (.clk, .rst_n, .en(1'b1), .bit_out(r[1]), .state(s1));
  lfsr31 #(.SEED(SEED2)) u_l2 (.clk, .rst_n, .en(1'b1), .bit_out(r[2]), .state(s2));

  assign valid = (r != 3'd0) && !drawn[r];
  assign piece = valid ? tile_t'({1'b0, r}) : T_EMPTY;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      drawn <= '0;
    else if (valid && ready) begin
      if ((drawn | (7'd1 << (r - 3'd1))) == 7'h7F)
        drawn <= '0;
      else
        drawn[r] <= 1'b1;
    end
  end

  logic unused;
  assign unused = ^{s0[30:1], s1[30:1], s2[30:1]};
endmodule
