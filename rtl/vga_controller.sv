// vga_controller: SVGA 800x600 @ 72 Hz timing from the 50 MHz clock.
//
// One pixel per clock. Line: 800 visible + 56 front porch + 120 sync + 64
// back porch = 1040 clocks; frame: 600 visible + 37 + 6 sync + 23 = 666
// lines, i.e. 72.2 frames per second. Both syncs are active high. hcount and
// vcount give the current pixel; `blank` is high outside the visible area;
// frame_start pulses on pixel (0,0) and vsync_start on the first clock of
// the vertical sync. The porch and sync widths are the standard VESA ones
// for this mode.
module vga_controller #(
  parameter int H_VIS = 800, H_FP = 56, H_SYNC = 120, H_BP = 64,
  parameter int V_VIS = 600, V_FP = 37, V_SYNC = 6,   V_BP = 23
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic [10:0] hcount,
  output logic [9:0]  vcount,
  output logic        hsync,
  output logic        vsync,
  output logic        blank,
  output logic        frame_start,
  output logic        vsync_start
);
  localparam int H_TOT = H_VIS + H_FP + H_SYNC + H_BP;
  localparam int V_TOT = V_VIS + V_FP + V_SYNC + V_BP;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hcount <= '0;
      vcount <= '0;
    end else if (hcount == 11'(H_TOT - 1)) begin
      hcount <= '0;
      vcount <= (vcount == 10'(V_TOT - 1)) ? '0 : vcount + 10'd1;
    end else begin
      hcount <= hcount + 11'd1;
    end
  end

  assign hsync = (hcount >= 11'(H_VIS + H_FP)) && (hcount < 11'(H_VIS + H_FP + H_SYNC));
  assign vsync = (vcount >= 10'(V_VIS + V_FP)) && (vcount < 10'(V_VIS + V_FP + V_SYNC));
  assign blank = (hcount >= 11'(H_VIS)) || (vcount >= 10'(V_VIS));
  assign frame_start = (hcount == 0) && (vcount == 0);
  assign vsync_start = (hcount == 0) && (vcount == 10'(V_VIS + V_FP));
endmodule
