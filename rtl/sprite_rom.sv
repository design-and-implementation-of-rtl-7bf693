// Sprite ROM: the 16 x 16 one-bit bitmaps of the star and of the ship.
//
// The pixel generator addresses it with the sprite kind and the row and
// column inside the sprite; the output says whether that pixel is painted.
// Column 0 is the leftmost pixel, row 0 the top one. Each row is held as a
// 16-bit word whose bit 15 is column 0.
//
// The star is a wide six-pointed shape with horizontal points at rows 4 and
// 11, after the star picture of the game; the ship is a small rocket pointing
// up. The document keeps the graphics in block RAM; the bitmaps themselves
// are this design's drawing of the shapes shown on the game screen. The ROM
// is combinational, so a pixel's colour is known in the cycle it is scanned.
module sprite_rom
  import si_pkg::*;
(
  input  sprite_t    kind,
  input  logic [3:0] row,
  input  logic [3:0] col,
  output logic       pixel
);

  logic [15:0] line;

  always_comb begin
    line = '0;
    if (kind == SPR_STAR) begin
      unique case (row)
        4'd0:  line = 16'b0000000110000000;
        4'd1:  line = 16'b0000001111000000;
        4'd2:  line = 16'b0000011111100000;
        4'd3:  line = 16'b0000111111110000;
        4'd4:  line = 16'b1111111111111111;
        4'd5:  line = 16'b0111111111111110;
        4'd6:  line = 16'b0011111111111100;
        4'd7:  line = 16'b0001111111111000;
        4'd8:  line = 16'b0001111111111000;
        4'd9:  line = 16'b0011111111111100;
        4'd10: line = 16'b0111111111111110;
        4'd11: line = 16'b1111111111111111;
        4'd12: line = 16'b0000111111110000;
        4'd13: line = 16'b0000011111100000;
        4'd14: line = 16'b0000001111000000;
        4'd15: line = 16'b0000000110000000;
      endcase
    end else begin
      unique case (row)
        4'd0:  line = 16'b0000000110000000;
        4'd1:  line = 16'b0000001111000000;
        4'd2:  line = 16'b0000001111000000;
        4'd3:  line = 16'b0000011111100000;
        4'd4:  line = 16'b0000011111100000;
        4'd5:  line = 16'b0000011111100000;
        4'd6:  line = 16'b0000111111110000;
        4'd7:  line = 16'b0000111111110000;
        4'd8:  line = 16'b0001111111111000;
        4'd9:  line = 16'b0011111111111100;
        4'd10: line = 16'b0111111111111110;
        4'd11: line = 16'b1111111111111111;
        4'd12: line = 16'b1111111111111111;
        4'd13: line = 16'b0110011111100110;
        4'd14: line = 16'b0000001111000000;
        4'd15: line = 16'b0000000000000000;
      endcase
    end
  end

  assign pixel = line[4'd15 - col];

endmodule
