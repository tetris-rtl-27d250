// text_line: a row of N characters, one char_render instance per character.
//
// Character i is placed at X + i * (6 << SCALE_LOG2). chars holds the codes
// with the leftmost character in the top byte, so a string literal can be
// passed directly. `on` is high on any lit pixel of the row.
module text_line #(
  parameter int X = 0,
  parameter int Y = 0,
  parameter int SCALE_LOG2 = 1,
  parameter int N = 4
) (
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  input  logic [N-1:0][7:0] chars,
  output logic        on
);
  logic [N-1:0] hit;
  for (genvar i = 0; i < N; i++) begin : g_ch
    char_render #(.X(X + i * (6 << SCALE_LOG2)), .Y(Y), .SCALE_LOG2(SCALE_LOG2)) u_ch (
      .hcount, .vcount, .ch(chars[N-1-i]), .on(hit[i])
    );
  end
  assign on = |hit;
endmodule
