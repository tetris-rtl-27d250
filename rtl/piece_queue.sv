// piece_queue: the piece preview, a 6-entry queue kept full by the bag.
//
// Entry 0 is the next piece to spawn; entries 1..5 follow in order. All six
// are output for the preview display and the network packet. `pop` removes
// the head and shifts the rest forward; `push` appends at the first free
// slot (or the last slot when a pop frees it in the same cycle). `full`
// tells the bag to stop. Empty slots read as T_EMPTY.
module piece_queue
  import tetris_pkg::*;
#(
  parameter int DEPTH = 6
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  push,
  input  tile_t push_piece,
  output logic  full,
  input  logic  pop,
  output tile_t head,
  output logic  head_valid,
  output logic [DEPTH-1:0][3:0] preview
);
  logic [$clog2(DEPTH+1)-1:0] count;
  tile_t q [DEPTH];

  assign full       = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign head       = q[0];
  assign head_valid = (count != 0);

  always_comb
    for (int i = 0; i < DEPTH; i++) preview[i] = q[i];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      for (int i = 0; i < DEPTH; i++) q[i] <= T_EMPTY;
    end else begin
      logic do_pop, do_push;
      do_pop  = pop && head_valid;
      do_push = push && (!full || do_pop);
      if (do_pop)
        for (int i = 0; i < DEPTH; i++)
          q[i] <= (i == DEPTH - 1) ? T_EMPTY : q[i+1];
      if (do_push)
        q[do_pop ? int'(count) - 1 : int'(count)] <= push_piece;
      count <= count + (do_push ? 1'b1 : 1'b0) - (do_pop ? 1'b1 : 1'b0);
    end
  end
endmodule
