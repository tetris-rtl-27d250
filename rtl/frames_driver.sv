// frames_driver: optional frame counter overlay.
//
// Counts frames (frame_start pulses) modulo 100000 and, when the switch
// `en` is on, draws the count as five digits in the top-left corner at
// (X, Y), in yellow, so that slow-motion video of the screen shows which
// frame a change appeared in. Registered counter, combinational drawing.
module frames_driver #(
  parameter int X = 4,
  parameter int Y = 4,
  parameter int SCALE_LOG2 = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        frame_start,
  input  logic        en,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  output logic [16:0] frames,
  output logic        active,
  output logic [23:0] rgb
);
  function automatic logic [7:0] dig(int v);
    return 8'h30 + 8'(v % 10);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) frames <= '0;
    else if (frame_start) frames <= (frames == 17'd99999) ? '0 : frames + 17'd1;
  end

  logic [4:0][7:0] s;
  logic on;
  always_comb
    s = {dig(int'(frames) / 10000), dig(int'(frames) / 1000), dig(int'(frames) / 100),
         dig(int'(frames) / 10), dig(int'(frames))};

  text_line #(.X(X), .Y(Y), .SCALE_LOG2(SCALE_LOG2), .N(5)) u_txt (.hcount, .vcount, .chars(s), .on);
  assign active = en && on;
  assign rgb    = 24'hFFFF00;
endmodule
