// font_pkg: 6x6 pixel character font for the on-screen text.
//
// glyph(ch) returns 36 bits, row 0 (top) in bits 35..30, and within a row
// the leftmost pixel in the most significant bit. Each glyph is drawn in the
// upper-left 5x5 pixels of its cell so that the sixth row and column
// separate neighbouring characters. Covered: digits, ':', '.', '-', and the
// capital letters used by the screens; any other code is blank. The glyph
// shapes are this design's own.
package font_pkg;
  function automatic logic [35:0] glyph(logic [7:0] ch);
    case (ch)
      8'h30: return 36'b011100100110101010110010011100000000;  // 0
      8'h31: return 36'b001000011000001000001000011100000000;  // 1
      8'h32: return 36'b111100000010011100100000111110000000;  // 2
      8'h33: return 36'b111100000010001100000010111100000000;  // 3
      8'h34: return 36'b100100100100111110000100000100000000;  // 4
      8'h35: return 36'b111110100000111100000010111100000000;  // 5
      8'h36: return 36'b011100100000111100100010011100000000;  // 6
      8'h37: return 36'b111110000100001000010000010000000000;  // 7
      8'h38: return 36'b011100100010011100100010011100000000;  // 8
      8'h39: return 36'b011100100010011110000010011100000000;  // 9
      8'h3A: return 36'b000000001000000000001000000000000000;  // :
      8'h2E: return 36'b000000000000000000000000001000000000;  // .
      8'h41: return 36'b011100100010111110100010100010000000;  // A
      8'h42: return 36'b111100100010111100100010111100000000;  // B
      8'h43: return 36'b011110100000100000100000011110000000;  // C
      8'h44: return 36'b111100100010100010100010111100000000;  // D
      8'h45: return 36'b111110100000111100100000111110000000;  // E
      8'h47: return 36'b011110100000100110100010011110000000;  // G
      8'h48: return 36'b100010100010111110100010100010000000;  // H
      8'h49: return 36'b111110001000001000001000111110000000;  // I
      8'h4B: return 36'b100100101000110000101000100100000000;  // K
      8'h4C: return 36'b100000100000100000100000111110000000;  // L
      8'h4D: return 36'b100010110110101010100010100010000000;  // M
      8'h4E: return 36'b100010110010101010100110100010000000;  // N
      8'h4F: return 36'b011100100010100010100010011100000000;  // O
      8'h50: return 36'b111100100010111100100000100000000000;  // P
      8'h52: return 36'b111100100010111100101000100100000000;  // R
      8'h53: return 36'b011110100000011100000010111100000000;  // S
      8'h54: return 36'b111110001000001000001000001000000000;  // T
      8'h55: return 36'b100010100010100010100010011100000000;  // U
      8'h57: return 36'b100010100010101010110110100010000000;  // W
      8'h59: return 36'b100010010100001000001000001000000000;  // Y
      8'h2D: return 36'b000000000000111110000000000000000000;  // -
      default: return '0;
    endcase
  endfunction
endpackage
