// lines_driver: shows "LINES nnn" and, when show_sent is set (battle mode),
// "SENT nnn" on the line below.
//
// Counts up to 999 are split into decimal digits and drawn with two
// text_line rows at (X, Y) and (X, Y + 2 * cell). White text. `active` is
// high on lit pixels when `en` is set. Combinational.
module lines_driver #(
  parameter int X = 100,
  parameter int Y = 430,
  parameter int SCALE_LOG2 = 1
) (
  input  logic        en,
  input  logic        show_sent,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  input  logic [9:0]  cleared,
  input  logic [9:0]  sent,
  output logic        active,
  output logic [23:0] rgb
);
  localparam int CELL = 6 << SCALE_LOG2;
  function automatic logic [7:0] dig(int v);
    return 8'h30 + 8'(v % 10);
  endfunction

  logic [8:0][7:0] l0, l1;
  logic on0, on1;
  always_comb begin
    l0 = {"LINES ", dig(int'(cleared) / 100), dig(int'(cleared) / 10), dig(int'(cleared))};
    l1 = {"SENT  ", dig(int'(sent) / 100), dig(int'(sent) / 10), dig(int'(sent))};
  end

  text_line #(.X(X), .Y(Y),            .SCALE_LOG2(SCALE_LOG2), .N(9)) u_l0 (.hcount, .vcount, .chars(l0), .on(on0));
  text_line #(.X(X), .Y(Y + 2 * CELL), .SCALE_LOG2(SCALE_LOG2), .N(9)) u_l1 (.hcount, .vcount, .chars(l1), .on(on1));
  assign active = en && (on0 || (show_sent && on1));
  assign rgb    = 24'hFFFFFF;
endmodule
