// Testbench for hud_text: renders several score / level values and compares
// every pixel of the text area with a reference drawn from a string font
// and decimal digits computed with / and %.
module tb_hud_text;
  import si_pkg::*;
  coord_t px_x, px_y;
  logic [15:0] score;
  logic [7:0] level;
  logic text_on;
  int checks = 0, failures = 0;

  hud_text dut (.px_x, .px_y, .score, .level, .text_on);

  // font rows as text, '#' = lit
  string font [10][5] = '{
    '{"###", "#.#", "#.#", "#.#", "###"}, '{".#.", "##.", ".#.", ".#.", "###"},
    '{"###", "..#", "###", "#..", "###"}, '{"###", "..#", "###", "..#", "###"},
    '{"#.#", "#.#", "###", "..#", "..#"}, '{"###", "#..", "###", "..#", "###"},
    '{"###", "#..", "###", "#.#", "###"}, '{"###", "..#", "..#", "..#", "..#"},
    '{"###", "#.#", "###", "#.#", "###"}, '{"###", "#.#", "###", "..#", "###"}};

  function automatic bit ref_line(int value, int ndig, int x, int y, int y0);
    int dx, dy, idx, col, p, d;
    dx = x - 16; dy = y - y0;
    if (dx < 0 || dy < 0 || dy >= 10 || dx >= 8 * ndig) return 0;
    idx = dx / 8; col = (dx % 8) / 2;
    if (col > 2) return 0;
    p = 1; for (int i = 0; i < ndig - 1 - idx; i++) p *= 10;
    d = (value / p) % 10;
    return font[d][dy / 2][col] == "#";
  endfunction

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int scores [4] = '{0, 12345, 65534, 908};
  int levels [4] = '{1, 7, 255, 42};
  initial begin
    for (int t = 0; t < 4; t++) begin
      score = 16'(scores[t]); level = 8'(levels[t]);
      for (int y = 0; y < 40; y++)
        for (int x = 0; x < 70; x++) begin
          bit exp;
          px_x = coord_t'(x); px_y = coord_t'(y); #1;
          exp = ref_line(scores[t] % 100000, 5, x, y, 22) || ref_line(levels[t] % 1000, 3, x, y, 8);
          checks++;
          if (text_on !== exp) begin
            failures++;
            if (failures < 10) $display("score %0d level %0d (%0d,%0d): %0b", scores[t], levels[t], x, y, text_on);
          end
        end
    end
    // nothing drawn away from the corner
    px_x = 300; px_y = 300; #1; checks++; if (text_on) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
