// The five simulation test cases of the original game description, run on
// the graphics unit with a short movement tick (DIVIDE_LIMIT = 40):
//   1. with video_on high the picture is drawn (background colour 001) and
//      the ship position follows the left / right buttons;
//   2. nes_a and nes_b together produce a shot (and either alone does not);
//   3. a shot that meets a star raises destruction;
//   4. each destruction adds 2 to the score;
//   5. when all three star groups are defeated (counter(0) = 0) the level
//      goes up by 1 and the stars come back.
// For case 5 all stars but one are removed with force/release and the last
// one is shot. Frames are shortened by presenting the frame position
// (0, 480) directly instead of scanning the raster.
module tb_test_cases;
  import si_pkg::*;
  logic clk = 0, not_reset = 0, video_on = 1;
  logic nes_a = 0, nes_b = 0, nes_left = 0, nes_right = 0;
  coord_t px_x = 600, px_y = 300;
  rgb_t rgb;
  logic [15:0] score;
  logic [7:0] level;
  logic shooting_sound, destruction_sound;
  int checks = 0, failures = 0, shots = 0, kills = 0;
  int case_pass [1:5];

  graphics #(.DIVIDE_LIMIT(40)) dut (
    .clk, .not_reset, .px_x, .px_y, .video_on, .nes_a, .nes_b, .nes_left, .nes_right,
    .rgb, .score, .level, .shooting_sound, .destruction_sound);

  always #10 clk = ~clk;

  always @(posedge clk) if (not_reset) begin
    if (shooting_sound) shots++;
    if (destruction_sound) kills++;
  end

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int tc, input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; case_pass[tc] = 0; $display("FAIL test case %0d: %s", tc, what); end
  endtask

  task automatic at(input int x, input int y);
    px_x = coord_t'(x); px_y = coord_t'(y); #1;
  endtask

  task automatic frame();
    px_x = 0; px_y = 480; repeat (2) @(negedge clk);
    px_x = 600; px_y = 300; repeat (2) @(negedge clk);
  endtask

  task automatic fire();
    nes_a = 1; nes_b = 1; @(negedge clk); nes_a = 0; nes_b = 0;
  endtask

  initial begin
    int s0, k0;
    for (int i = 1; i <= 5; i++) case_pass[i] = 1;
    repeat (2) @(negedge clk);
    not_reset = 1;
    // --- 1: drawing and ship movement (one tick = 21 cycles)
    at(300, 300); check(1, rgb == 3'b001, "background 001 with video_on");
    video_on = 0; at(300, 300); check(1, rgb == 3'b000, "dark without video_on"); video_on = 1;
    nes_right = 1; repeat (21 * 4) @(negedge clk); nes_right = 0;
    check(1, dut.ship_x == 312 + 20, $sformatf("ship x %0d after 4 ticks right", dut.ship_x));
    nes_left = 1; repeat (21 * 2) @(negedge clk); nes_left = 0;
    check(1, dut.ship_x == 312 + 10, $sformatf("ship x %0d after 2 ticks left", dut.ship_x));
    at(322 + 7, 447); check(1, rgb == RGB_CYAN, "ship drawn at its new place");
    px_x = 600; px_y = 300;
    // --- 2: shooting needs nes_a and nes_b
    nes_a = 1; repeat (3) @(negedge clk); nes_a = 0;
    nes_b = 1; repeat (3) @(negedge clk); nes_b = 0;
    check(2, shots == 0 && !dut.mis_active, "one input alone does not shoot");
    fire();
    check(2, shots == 1 && dut.mis_active, "nes_a and nes_b shoot");
    // --- 3 and 4: fly until the missile meets a star; fire again if it misses
    s0 = score; k0 = kills;
    for (int f = 0; f < 2000 && kills == k0; f++) begin
      if (!dut.mis_active) fire();
      frame();
    end
    check(3, kills == k0 + 1, "destruction raised by a hit");
    check(3, !dut.mis_active, "missile gone after the hit");
    check(4, score == 16'(s0 + 2), $sformatf("score %0d after one destruction", score));
    // --- 5: leave one star in the bottom row, shoot it
    force dut.g_row[0].u_group.alive = 8'h00;
    force dut.g_row[1].u_group.alive = 8'h00;
    force dut.g_row[2].u_group.alive = 8'h10;
    @(negedge clk);
    release dut.g_row[0].u_group.alive;
    release dut.g_row[1].u_group.alive;
    release dut.g_row[2].u_group.alive;
    check(5, dut.counter[0] == 1'b0, "counter(0) is 0");
    check(5, level == 1 && !dut.restart, "level 1 with a star left");
    for (int f = 0; f < 20000 && level == 1; f++) begin
      if (!dut.mis_active) fire();
      frame();
    end
    @(negedge clk);
    check(5, level == 2, $sformatf("level %0d after the last star", level));
    check(5, dut.g_row[0].alive == 8'hff && dut.g_row[1].alive == 8'hff && dut.g_row[2].alive == 8'hff,
          "stars back after the level step");
    check(4, score == 16'(s0 + 4), "second destruction adds 2 more");
    for (int i = 1; i <= 5; i++) $display("test case %0d: %s", i, case_pass[i] ? "pass" : "FAIL");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
