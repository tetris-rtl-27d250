// menu_driver: the start screen and the network ready screen.
//
// On the start screen (`start_screen`) it shows the title "TETRIS" in large
// letters and the two prompts "DROP - SPRINT" and "HOLD - BATTLE". On the
// ready screen (`ready_screen`) it shows "READY" and "WAITING" while the
// network waits for the other board. The title is cyan, prompts white.
// `active` is high on lit text pixels of the screen shown. Combinational.
// The prompt texts are this design's own; the logo picture and QR code of
// the original screen are not reproduced.
module menu_driver (
  input  logic        start_screen,
  input  logic        ready_screen,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  output logic        active,
  output logic [23:0] rgb
);
  logic t_on, p0_on, p1_on, r0_on, r1_on;
  text_line #(.X(256), .Y(120), .SCALE_LOG2(3), .N(6))  u_title (.hcount, .vcount, .chars("TETRIS"),        .on(t_on));
  text_line #(.X(244), .Y(300), .SCALE_LOG2(2), .N(13)) u_p0    (.hcount, .vcount, .chars("DROP - SPRINT"), .on(p0_on));
  text_line #(.X(244), .Y(360), .SCALE_LOG2(2), .N(13)) u_p1    (.hcount, .vcount, .chars("HOLD - BATTLE"), .on(p1_on));
  text_line #(.X(280), .Y(200), .SCALE_LOG2(3), .N(5))  u_r0    (.hcount, .vcount, .chars("READY"),         .on(r0_on));
  text_line #(.X(316), .Y(320), .SCALE_LOG2(2), .N(7))  u_r1    (.hcount, .vcount, .chars("WAITING"),       .on(r1_on));

  always_comb begin
    active = 1'b0;
    rgb    = 24'hFFFFFF;
    if (start_screen) begin
      active = t_on || p0_on || p1_on;
      if (t_on) rgb = 24'h00FFFF;
    end else if (ready_screen) begin
      active = r0_on || r1_on;
      if (r0_on) rgb = 24'h00FFFF;
    end
  end
endmodule
