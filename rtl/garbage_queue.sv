// garbage_queue: pending garbage received from the opponent.
//
// Each attack (in_valid with in_lines > 0) becomes one entry stamped with its
// arrival time; at most MAX_LINES (12) lines are pending in total and lines
// beyond that are dropped. The oldest entry becomes ready DELAY_CYCLES after
// it arrived; ready_lines then shows its size until the game core takes it
// (take), and is 0 otherwise. `pending` is the total waiting. The 12-line
// limit and the delayed release are the design's; the 1 s delay and the
// dropping of excess lines are this design's choices.
module garbage_queue #(
  parameter int MAX_LINES    = 12,
  parameter int DELAY_CYCLES = 50_000_000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,        // new game
  input  logic       in_valid,
  input  logic [3:0] in_lines,
  input  logic       take,
  output logic [3:0] ready_lines,
  output logic [3:0] pending
);
  localparam int TW = $clog2(DELAY_CYCLES + 2);
  localparam int AW = $clog2(MAX_LINES);

  logic [3:0]    cnt   [MAX_LINES];
  logic [TW-1:0] age   [MAX_LINES];
  logic [AW:0]   n;    // number of entries

  logic [3:0] room, add;
  assign room = 4'(MAX_LINES) - pending;
  assign add  = (in_lines > room) ? room : in_lines;
  assign ready_lines = (n != 0 && age[0] >= TW'(DELAY_CYCLES)) ? cnt[0] : 4'd0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n       <= '0;
      pending <= '0;
      for (int i = 0; i < MAX_LINES; i++) begin
        cnt[i] <= '0;
        age[i] <= '0;
      end
    end else if (clear) begin
      n       <= '0;
      pending <= '0;
    end else begin
      logic do_take, do_add;
      logic [AW:0] base;
      do_take = take && (ready_lines != 0);
      do_add  = in_valid && (add != 0);
      // age every entry, saturating
      for (int i = 0; i < MAX_LINES; i++) begin
        logic [TW-1:0] a;
        a = (age[i] > TW'(DELAY_CYCLES)) ? age[i] : age[i] + 1'b1;
        if (do_take) begin
          if (i < MAX_LINES - 1) begin
            cnt[i] <= cnt[i+1];
            age[i] <= (age[i+1] > TW'(DELAY_CYCLES)) ? age[i+1] : age[i+1] + 1'b1;
          end
        end else begin
          age[i] <= a;
        end
      end
      base = do_take ? n - 1'b1 : n;
      if (do_add) begin
        cnt[base] <= add;
        age[base] <= '0;
      end
      n       <= base + (do_add ? 1'b1 : 1'b0);
      pending <= pending + (do_add ? add : 4'd0) - (do_take ? cnt[0] : 4'd0);
    end
  end
endmodule
