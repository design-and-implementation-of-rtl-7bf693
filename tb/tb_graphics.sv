// Testbench for graphics: checks the colours of chosen pixels (background,
// blanking, ship, stars, missile, score board), moves the ship, then keeps
// firing from the centre until all three star rows are cleared, checking
// the score (+2 per star), the level step and the refill of the rows.
// Frames are shortened: the frame position (0, 480) is presented briefly
// instead of scanning the whole raster.
module tb_graphics;
  import si_pkg::*;
  logic clk = 0, not_reset = 0, video_on = 1;
  logic nes_a = 0, nes_b = 0, nes_left = 0, nes_right = 0;
  coord_t px_x = 300, px_y = 300;
  rgb_t rgb;
  logic [15:0] score;
  logic [7:0] level;
  logic shooting_sound, destruction_sound;
  int checks = 0, failures = 0, shots = 0, kills = 0, frames = 0;

  graphics #(.DIVIDE_LIMIT(40)) dut (
    .clk, .not_reset, .px_x, .px_y, .video_on, .nes_a, .nes_b, .nes_left, .nes_right,
    .rgb, .score, .level, .shooting_sound, .destruction_sound);

  always #10 clk = ~clk;

  always @(posedge clk) begin
    if (not_reset && shooting_sound) shots++;
    if (not_reset && destruction_sound) kills++;
  end

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic at(input int x, input int y);
    px_x = coord_t'(x); px_y = coord_t'(y);
    #1;
  endtask

  task automatic frame();
    px_x = 0; px_y = 480; repeat (2) @(negedge clk);
    px_x = 1; repeat (2) @(negedge clk);
    frames++;
  endtask

  initial begin
    int level_before;
    repeat (2) @(negedge clk);
    not_reset = 1;
    // --- still picture after reset
    at(300, 300); check(rgb == RGB_BLUE, "background blue");
    at(312 + 7, 440 + 7); check(rgb == RGB_CYAN, "ship body");
    at(312, 440); check(rgb == RGB_BLUE, "ship corner is background");
    at(100 + 7, 40 + 7); check(rgb == RGB_CYAN, "first star of row 1");
    at(100 + 7 * 24 + 7, 88 + 7); check(rgb == RGB_CYAN, "last star of row 3");
    at(100 + 20, 40 + 7); check(rgb == RGB_BLUE, "gap between stars");
    // level 001: third digit '1', middle column of the top font row
    at(16 + 16 + 2, 8); check(rgb == RGB_WHITE, "level digit");
    at(16 + 16, 8); check(rgb == RGB_BLUE, "level digit background");
    // score 00000: first digit '0', left column
    at(16, 22 + 4); check(rgb == RGB_WHITE, "score digit");
    video_on = 0;
    at(300, 300); check(rgb == RGB_BLACK, "blank outside video_on");
    video_on = 1;
    check(score == 0 && level == 1, "reset score and level");
    // --- ship movement: the divider ticks every 21 cycles; 3 ticks right
    px_x = 600; px_y = 300;
    nes_right = 1; repeat (21 * 3) @(negedge clk); nes_right = 0;
    at(327 + 7, 447); check(rgb == RGB_CYAN, "ship moved 15 right");
    at(312 + 4, 447); check(rgb == RGB_BLUE, "old ship place empty");
    nes_left = 1; repeat (21 * 3) @(negedge clk); nes_left = 0;
    at(312 + 7, 447); check(rgb == RGB_CYAN, "ship back");
    // --- fire once: missile above the ship's nose, yellow
    px_x = 600; px_y = 300;
    nes_a = 1; nes_b = 1; @(negedge clk); nes_a = 0; nes_b = 0;
    at(312 + 7, 432); check(rgb == RGB_YELLOW, "missile drawn");
    at(312 + 8, 439); check(rgb == RGB_YELLOW, "missile bottom");
    frame();
    at(312 + 7, 428); check(rgb == RGB_YELLOW, "missile climbed 4");
    at(312 + 7, 436); check(rgb == RGB_BLUE, "missile tail moved");
    // --- keep firing until every star is gone and the level steps
    level_before = level;
    while (kills < 24 && frames < 60000) begin
      nes_a = 1; nes_b = 1; @(negedge clk); nes_a = 0; nes_b = 0;
      frame();
      check(score == 16'(2 * kills), $sformatf("score %0d after %0d kills", score, kills));
    end
    check(kills == 24, $sformatf("kills %0d in %0d frames, %0d shots", kills, frames, shots));
    @(negedge clk);
    check(level == 8'(level_before + 1), $sformatf("level %0d", level));
    check(score == 48, "score 48 after a full screen");
    // rows refilled at their start position
    at(100 + 7, 40 + 7); check(rgb == RGB_CYAN, "stars back, row 1");
    at(100 + 3 * 24 + 7, 64 + 7); check(rgb == RGB_CYAN, "stars back, row 2");
    check(shots > 24, "more shots than kills");
    $display("frames %0d shots %0d kills %0d", frames, shots, kills);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
