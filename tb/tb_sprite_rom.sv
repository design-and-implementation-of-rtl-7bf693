// Testbench for sprite_rom: checks the pixel count of every row of both
// sprites, left-right symmetry, and a few individual pixels.
module tb_sprite_rom;
  import si_pkg::*;
  sprite_t kind;
  logic [3:0] row, col;
  logic pixel;
  int checks = 0, failures = 0;

  sprite_rom dut (.kind, .row, .col, .pixel);

  // Painted pixels per row, counted from the drawings.
  int star_cnt [16] = '{2, 4, 6, 8, 16, 14, 12, 10, 10, 12, 14, 16, 8, 6, 4, 2};
  int ship_cnt [16] = '{2, 4, 4, 6, 6, 6, 8, 8, 10, 12, 14, 16, 16, 10, 4, 0};

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2; k++) begin
      kind = sprite_t'(k);
      for (int r = 0; r < 16; r++) begin
        int n;
        logic [15:0] line;
        n = 0;
        row = 4'(r);
        for (int c = 0; c < 16; c++) begin
          col = 4'(c); #1;
          line[c] = pixel;
          n += int'(pixel);
        end
        checks++;
        if (n != (k == 0 ? star_cnt[r] : ship_cnt[r])) begin
          failures++; $display("kind %0d row %0d: %0d pixels", k, r, n);
        end
        for (int c = 0; c < 8; c++) begin
          checks++;
          if (line[c] != line[15 - c]) begin failures++; $display("asym kind %0d row %0d col %0d", k, r, c); end
        end
      end
    end
    // spot checks: star tip centre top, wide points at rows 4 and 11
    kind = SPR_STAR; row = 0; col = 7; #1 checks++; if (!pixel) failures++;
    row = 0; col = 6; #1 checks++; if (pixel) failures++;
    row = 4; col = 0; #1 checks++; if (!pixel) failures++;
    row = 7; col = 0; #1 checks++; if (pixel) failures++;
    kind = SPR_SHIP; row = 15; col = 8; #1 checks++; if (pixel) failures++;
    row = 13; col = 4; #1 checks++; if (pixel) failures++;
    row = 13; col = 1; #1 checks++; if (!pixel) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
