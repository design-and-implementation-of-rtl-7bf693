// Score board: paints the level and the score as decimal digits in the top
// left corner of the screen.
//
// The binary level and score are turned into decimal digits with the
// shift-and-add-3 ("double dabble") method, all in combinational logic.
// Digits are drawn from a 3 x 5 pixel font, each font pixel 2 x 2 screen
// pixels, on an 8-pixel pitch. The level (LEVEL_DIGITS digits) is drawn at
// (X0, Y_LEVEL), the score (SCORE_DIGITS digits) below it at (X0, Y_SCORE).
// text_on is high when the scanned pixel (px_x, px_y) is a lit font pixel.
//
// Interface: purely combinational, from pixel coordinate to text_on.
//
// The document shows the level and score in the corner of the game screen;
// the font, the layout and the digit counts are this design's choice.
module hud_text
  import si_pkg::*;
#(
  parameter int unsigned SCORE_W      = 16,
  parameter int unsigned LEVEL_W      = 8,
  parameter int unsigned SCORE_DIGITS = 5,
  parameter int unsigned LEVEL_DIGITS = 3,
  parameter int unsigned X0           = 16,
  parameter int unsigned Y_LEVEL      = 8,
  parameter int unsigned Y_SCORE      = 22
) (
  input  coord_t             px_x,
  input  coord_t             px_y,
  input  logic [SCORE_W-1:0] score,
  input  logic [LEVEL_W-1:0] level,
  output logic               text_on
);

  localparam int unsigned MAXD = (SCORE_DIGITS > LEVEL_DIGITS) ? SCORE_DIGITS : LEVEL_DIGITS;

  // Binary to packed BCD, 4 bits per digit, least significant digit first.
  function automatic logic [4*MAXD-1:0] to_bcd(input logic [31:0] bin, input int unsigned nbits);
    logic [4*MAXD-1:0] bcd;
    bcd = '0;
    for (int b = 31; b >= 0; b--) begin
      if (b < int'(nbits)) begin
        for (int d = 0; d < int'(MAXD); d++)
          if (bcd[4*d +: 4] >= 4'd5) bcd[4*d +: 4] = bcd[4*d +: 4] + 4'd3;
        bcd = {bcd[4*MAXD-2:0], bin[b]};
      end
    end
    return bcd;
  endfunction

  // One row of the 3 x 5 font, bit 2 = left column.
  function automatic logic [2:0] font_row(input logic [3:0] digit, input logic [2:0] row);
    logic [14:0] glyph;
    unique case (digit)
      4'd0: glyph = 15'b111_101_101_101_111;
      4'd1: glyph = 15'b010_110_010_010_111;
      4'd2: glyph = 15'b111_001_111_100_111;
      4'd3: glyph = 15'b111_001_111_001_111;
      4'd4: glyph = 15'b101_101_111_001_001;
      4'd5: glyph = 15'b111_100_111_001_111;
      4'd6: glyph = 15'b111_100_111_101_111;
      4'd7: glyph = 15'b111_001_001_001_001;
      4'd8: glyph = 15'b111_101_111_101_111;
      4'd9: glyph = 15'b111_101_111_001_111;
      default: glyph = '0;
    endcase
    return (row < 3'd5) ? glyph[3*(4 - row) +: 3] : 3'b000;
  endfunction

  logic [4*MAXD-1:0] score_bcd, level_bcd;
  assign score_bcd = to_bcd(32'(score), SCORE_W);
  assign level_bcd = to_bcd(32'(level), LEVEL_W);

  // Draws one line of 'ndig' digits whose top-left corner is (X0, y0).
  function automatic logic line_pixel(input logic [4*MAXD-1:0] bcd, input int unsigned ndig,
                                      input coord_t x, input coord_t y, input int unsigned y0);
    int unsigned dx, dy, idx, col;
    logic [2:0] bits;
    if (x < coord_t'(X0) || y < coord_t'(y0)) return 1'b0;
    dx = int'(x) - X0;
    dy = int'(y) - y0;
    if (dy >= 10 || dx >= 8 * ndig) return 1'b0;
    idx = dx / 8;            // digit position, 0 = most significant
    col = (dx % 8) / 2;      // font column, 3 = gap between digits
    if (col > 2) return 1'b0;
    bits = font_row(bcd[4*(ndig-1-idx) +: 4], 3'(dy / 2));
    return bits[2-col];
  endfunction

  assign text_on = line_pixel(level_bcd, LEVEL_DIGITS, px_x, px_y, Y_LEVEL) ||
                   line_pixel(score_bcd, SCORE_DIGITS, px_x, px_y, Y_SCORE);

endmodule
