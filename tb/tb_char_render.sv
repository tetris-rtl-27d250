// tb_char_render: self-checking testbench for char_render and the font.
// Every character the design prints is rendered at three scales and each
// pixel of a window around it is compared with the glyph table: the 6 x 6
// cell must appear scaled by 2**SCALE_LOG2 at (X, Y) and nothing may light
// outside it. Also checks that every used glyph is non-blank and that the
// digits are pairwise different.
module tb_char_render;
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic [7:0]  ch;
  logic [2:0]  on;
  int checks = 0, failures = 0;
  string chars = "0123456789:.-ABCDEGHIKLMNOPRSTUWY";

  `include "text_ref.svh"

  char_render #(.X(37), .Y(21), .SCALE_LOG2(0)) d0 (.hcount, .vcount, .ch, .on(on[0]));
  char_render #(.X(37), .Y(21), .SCALE_LOG2(1)) d1 (.hcount, .vcount, .ch, .on(on[1]));
  char_render #(.X(37), .Y(21), .SCALE_LOG2(3)) d3 (.hcount, .vcount, .ch, .on(on[2]));

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < chars.len(); i++) begin
      string one;
      one = chars.substr(i, i);
      ch = chars[i];
      checks++;
      if (font_pkg::glyph(ch) == '0) begin failures++; $display("FAIL: blank glyph %s", one); end
      for (int v = 15; v < 21 + 48 + 4; v++)
        for (int h = 30; h < 37 + 48 + 4; h++) begin
          hcount = 11'(h); vcount = 10'(v);
          #1;
          checks += 3;
          if (on[0] != text_on(one, 37, 21, 0, h, v)) failures++;
          if (on[1] != text_on(one, 37, 21, 1, h, v)) failures++;
          if (on[2] != text_on(one, 37, 21, 3, h, v)) begin
            failures++;
            if (failures < 10) $display("FAIL %s at (%0d,%0d)", one, h, v);
          end
        end
    end
    for (int a = 0; a < 10; a++)
      for (int b = a + 1; b < 10; b++) begin
        checks++;
        if (font_pkg::glyph(8'h30 + 8'(a)) == font_pkg::glyph(8'h30 + 8'(b))) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
