// garbage_calc: lines sent to the opponent for each locked piece.
//
// On every clr_valid pulse (one per locked piece) the attack is the sum of
//   base   Single 0, Double 1, Triple 2, Tetris 4,
//          T-Spin Single 2, T-Spin Double 4, T-Spin Triple 6,
//          Mini T-Spin Single 0, Mini T-Spin Double 1
//   combo  by consecutive clears: 0:+0 1:+1 2:+1 3:+2 4:+2 5:+3 6:+3
//          7:+4 8:+4 9:+4 10 and more:+5
//   +1     back-to-back (a Tetris or T-spin clear after another one)
//   +4     all clear
// and is output one cycle later on sent_valid (also when it is 0), saturated
// to 15 for the 4-bit garbage field of the network packet. A lock without a
// line clear ends the combo; a clear that is neither a Tetris nor a T-spin
// ends the back-to-back chain. The tables are the design's (Tetris 99
// values); the combo and back-to-back bookkeeping is the usual guideline one.
module garbage_calc
  import tetris_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clr_valid,
  input  clear_t     clr,
  output logic       sent_valid,
  output logic [3:0] sent,
  output logic [4:0] combo,   // consecutive clears - 1 (valid when in_combo)
  output logic       in_combo,
  output logic       b2b      // last clear was difficult
);
  function automatic logic [3:0] base_lines(clear_t c);
    if (c.tspin && c.mini)
      return (c.lines == 3'd2) ? 4'd1 : 4'd0;
    if (c.tspin)
      case (c.lines)
        3'd1: return 4'd2;
        3'd2: return 4'd4;
        3'd3: return 4'd6;
        default: return 4'd0;
      endcase
    case (c.lines)
      3'd2: return 4'd1;
      3'd3: return 4'd2;
      3'd4: return 4'd4;
      default: return 4'd0;
    endcase
  endfunction

  function automatic logic [3:0] combo_bonus(logic [4:0] n);
    case (n)
      5'd0:             return 4'd0;
      5'd1, 5'd2:       return 4'd1;
      5'd3, 5'd4:       return 4'd2;
      5'd5, 5'd6:       return 4'd3;
      5'd7, 5'd8, 5'd9: return 4'd4;
      default:          return 4'd5;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sent_valid <= 1'b0;
      sent       <= '0;
      combo      <= '0;
      in_combo   <= 1'b0;
      b2b        <= 1'b0;
    end else begin
      sent_valid <= clr_valid;
      if (clr_valid) begin
        if (clr.lines == 0) begin
          in_combo <= 1'b0;
          combo    <= '0;
          sent     <= '0;
        end else begin
          logic       difficult;
          logic [4:0] n;
          logic [6:0] total;
          difficult = (clr.lines == 3'd4) || clr.tspin;
          n         = in_combo ? ((combo == 5'd31) ? combo : combo + 5'd1) : 5'd0;
          total     = 7'(base_lines(clr)) + 7'(combo_bonus(n))
                    + ((difficult && b2b) ? 7'd1 : 7'd0)
                    + (clr.all_clear ? 7'd4 : 7'd0);
          sent      <= (total > 7'd15) ? 4'd15 : total[3:0];
          combo     <= n;
          in_combo  <= 1'b1;
          b2b       <= difficult;
        end
      end
    end
  end
endmodule
