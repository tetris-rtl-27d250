// game_end_driver: the game won / game lost screen.
//
// Shows "YOU WIN" in green or "YOU LOSE" in red, then the statistics of the
// finished game: its time (through a timer_driver) and its lines cleared
// and sent (through a lines_driver). `active` is high on any lit pixel when
// `en` is set. Combinational. The win/lose photographs of the original
// screen are not reproduced.
module game_end_driver (
  input  logic        en,
  input  logic        won,
  input  logic        battle,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  input  logic [4:0]  hours,
  input  logic [5:0]  minutes,
  input  logic [5:0]  seconds,
  input  logic [9:0]  millis,
  input  logic [9:0]  cleared,
  input  logic [9:0]  sent,
  output logic        active,
  output logic [23:0] rgb
);
  logic w_on, l_on, t_act, n_act;
  logic [23:0] t_rgb, n_rgb;
  text_line #(.X(232), .Y(120), .SCALE_LOG2(3), .N(7)) u_win  (.hcount, .vcount, .chars("YOU WIN"),  .on(w_on));
  text_line #(.X(208), .Y(120), .SCALE_LOG2(3), .N(8)) u_lose (.hcount, .vcount, .chars("YOU LOSE"), .on(l_on));
  timer_driver #(.X(268), .Y(280), .SCALE_LOG2(2)) u_time (
    .en(1'b1), .hcount, .vcount, .hours, .minutes, .seconds, .millis, .active(t_act), .rgb(t_rgb)
  );
  lines_driver #(.X(292), .Y(340), .SCALE_LOG2(2)) u_lines (
    .en(1'b1), .show_sent(battle), .hcount, .vcount, .cleared, .sent, .active(n_act), .rgb(n_rgb)
  );

  always_comb begin
    active = en && ((won ? w_on : l_on) || t_act || n_act);
    if (won && w_on)       rgb = 24'h00FF00;
    else if (!won && l_on) rgb = 24'hFF0000;
    else if (t_act)        rgb = t_rgb;
    else                   rgb = n_rgb;
  end
endmodule
