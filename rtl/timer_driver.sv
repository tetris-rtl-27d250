// timer_driver: shows the game time as "H:MM:SS.mmm".
//
// Takes the binary hours/minutes/seconds/milliseconds of the game clock and
// splits them into decimal digits (divide and remainder by constants), then
// draws the 11 characters with a text_line at (X, Y), scale 2^SCALE_LOG2.
// Hours above 9 show their last digit. The text colour is white. `active`
// is high on lit pixels when `en` is set. Combinational.
module timer_driver #(
  parameter int X = 100,
  parameter int Y = 400,
  parameter int SCALE_LOG2 = 1
) (
  input  logic        en,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  input  logic [4:0]  hours,
  input  logic [5:0]  minutes,
  input  logic [5:0]  seconds,
  input  logic [9:0]  millis,
  output logic        active,
  output logic [23:0] rgb
);
  function automatic logic [7:0] dig(int v);
    return 8'h30 + 8'(v % 10);
  endfunction

  logic [10:0][7:0] s;
  logic on;
  always_comb
    s = {dig(int'(hours)), ":", dig(int'(minutes) / 10), dig(int'(minutes)),
         ":", dig(int'(seconds) / 10), dig(int'(seconds)), ".",
         dig(int'(millis) / 100), dig(int'(millis) / 10), dig(int'(millis))};

  text_line #(.X(X), .Y(Y), .SCALE_LOG2(SCALE_LOG2), .N(11)) u_txt (
    .hcount, .vcount, .chars(s), .on
  );
  assign active = en && on;
  assign rgb    = 24'hFFFFFF;
endmodule
