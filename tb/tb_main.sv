// End-to-end testbench for main, the whole game on its VGA outputs.
//
// Two copies of the game run side by side from the same clock and buttons:
// one with the direct colour path (the default) and one through the frame
// buffer; the frame-buffer copy is clocked for the first two frames only.
// A monitor follows the raster by counting clock cycles from reset and
// checks, on every cycle, hsync / vsync against the pixel position, black
// during blanking, and (frame 0) the number of pixels of each colour against
// counts worked out from the sprite and font drawings. On odd lines the
// frame-buffer copy must show the direct copy's picture at half resolution.
//
// Game play: the ship is moved right, then held against the left wall; an
// aiming player then reads the star rows' positions, predicts where a star
// will be when a missile reaches it, steers the ship there and fires. After
// the ship has moved, all stars but one are removed with force/release (a
// shortcut: clearing 24 stars at full frame size would take thousands of
// frames), and the last star is shot, which scores, steps the level and
// refills the rows.
// Each mechanism (ship step, wall clamp, shot, destruction, level step and
// refill, frame-buffer write and read) is counted and must happen.
module tb_main;
  import si_pkg::*;
  localparam int DIV = 2000;                 // compare every 1001 cycles
  localparam int LINE = 800 * 2, FRAME = 525 * LINE;
  localparam int STAR_PIX = 144, SHIP_PIX = 126;

  logic clk = 0, clk_fb, fb_run = 1, not_reset = 0;
  logic left = 0, right = 0, shoot = 0;
  rgb_t rgb, rgb_fb, fb_rdata, unused_rd;
  logic hsync, vsync, hsync_fb, vsync_fb;
  logic [16:0] fb_raddr = 0;
  int checks = 0, failures = 0;

  assign clk_fb = clk && fb_run;

  main #(.DIVIDE_LIMIT(DIV)) dut (
    .clk, .not_reset, .left, .right, .shoot, .rgb, .hsync, .vsync,
    .fb_raddr(17'd0), .fb_rdata(unused_rd));

  main #(.DIVIDE_LIMIT(DIV), .USE_FRAME_BUFFER(1'b1)) dut_fb (
    .clk(clk_fb), .not_reset, .left, .right, .shoot, .rgb(rgb_fb), .hsync(hsync_fb), .vsync(vsync_fb),
    .fb_raddr, .fb_rdata);

  always #10 clk = ~clk;

  initial begin : watchdog
    repeat (400 * FRAME) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------------------ monitor
  int n = 0;                                  // clock edges since reset
  int cnt_cyan, cnt_white, cnt_blue, cnt_other;   // current frame, per pixel
  int last_cyan, last_white, last_blue, last_other, frames_done = 0;
  int ship_left, last_ship_left;
  int fb_compares = 0, sync_errs = 0, blank_errs = 0, fb_errs = 0;
  rgb_t pic [480][640];

  always @(posedge clk) if (not_reset) n++;

  // raster position of the colour now on the outputs: pixel (x, y), second
  // half of the pixel when sub is 1; the frame-buffer copy is one cycle later
  int x = 0, y = 0, sub = 0, x2 = 0, y2 = 0, sub2 = 0, p2 = 0;
  always @(negedge clk) if (not_reset && n > 0) begin
    if (hsync !== !(x >= 656 && x < 752) || vsync !== !(y >= 490 && y < 492)) sync_errs++;
    if (x < 640 && y < 480) begin
      pic[y][x] = rgb;
      if (sub == 0) begin
        case (rgb)
          RGB_CYAN: cnt_cyan++;
          RGB_WHITE: cnt_white++;
          RGB_BLUE: cnt_blue++;
          default: cnt_other++;
        endcase
        if (y == 440 + 11 && rgb == RGB_CYAN && x < ship_left) ship_left = x;
      end
    end else if (rgb !== RGB_BLACK) blank_errs++;
    if (x == 639 && y == 479 && sub == 1) begin
      last_cyan = cnt_cyan; last_white = cnt_white; last_blue = cnt_blue; last_other = cnt_other;
      last_ship_left = ship_left;
      cnt_cyan = 0; cnt_white = 0; cnt_blue = 0; cnt_other = 0; ship_left = 9999;
      frames_done++;
    end
    // frame-buffer copy: one more cycle of latency
    if (fb_run && n > 1) begin
      if (hsync_fb !== !(x2 >= 656 && x2 < 752) || vsync_fb !== !(y2 >= 490 && y2 < 492)) sync_errs++;
      if (x2 < 640 && y2 < 480) begin
        if (p2 >= 420000 && y2 % 2 == 1) begin
          fb_compares++;
          if (rgb_fb !== pic[y2 - 1][x2 & ~1]) fb_errs++;
        end
      end else if (rgb_fb !== RGB_BLACK) blank_errs++;
      p2 = p2 + sub2;
      sub2 = 1 - sub2;
      if (sub2 == 0) begin x2 = (x2 == 799) ? 0 : x2 + 1; if (x2 == 0) y2 = (y2 == 524) ? 0 : y2 + 1; end
    end
    sub = 1 - sub;
    if (sub == 0) begin x = (x == 799) ? 0 : x + 1; if (x == 0) y = (y == 524) ? 0 : y + 1; end
  end

  initial begin
    cnt_cyan = 0; cnt_white = 0; cnt_blue = 0; cnt_other = 0; ship_left = 9999;
  end

  // ----------------------------------------------------- mechanism counts
  int ship_steps = 0, wall_clamps = 0, shots = 0, kills = 0, level_steps = 0, fb_reads = 0;
  always @(posedge clk) if (not_reset) begin
    if (dut.u_graphics.compare && (left || right)) begin
      if ((right && dut.u_graphics.ship_x == 10'(624)) || (!right && left && dut.u_graphics.ship_x == 0))
        wall_clamps++;
      else ship_steps++;
    end
    if (dut.u_graphics.shooting_sound) shots++;
    if (dut.u_graphics.destruction_sound) kills++;
    if (dut.u_graphics.restart) level_steps++;
  end

  // ------------------------------------------------------------- helpers
  task automatic wait_frames(input int k);
    int target;
    target = frames_done + k;
    wait (frames_done >= target);
  endtask

  task automatic hold(ref logic b, input int ticks);
    @(negedge clk); b = 1; repeat (ticks * (DIV / 2 + 1)) @(negedge clk); b = 0;
  endtask

  // Reference model of one star row's march (bounds 8..632, width 184).
  task automatic row_step(inout int x, inout int y, inout bit r, inout bit d);
    if (r && x + 185 > 632 || !r && x < 9) begin
      r = !r; y = d ? y + 8 : y - 8; d = !d;
    end else x = r ? x + 1 : x - 1;
  endtask

  // Aim at star 'star' of the bottom row (row index 2) and fire once.
  // Returns when the frame tick after launch has passed.
  task automatic aim_and_fire(input int star);
    int x, y, target, sx;
    bit r, d;
    // right after a frame tick: the rows stand still for a whole frame
    wait (dut.pixel_y == 10'(481));
    x = int'(dut.u_graphics.g_row[2].master_x);
    y = int'(dut.u_graphics.g_row[2].master_y);
    r = (dut.u_graphics.g_row[2].state == DIR_RIGHT);
    d = (dut.u_graphics.g_row[2].state_v == DIR_DOWN);
    target = -1;
    for (int j = 1; j < 200; j++) begin
      int my;
      my = 432 - 4 * (j - 1);         // missile top when tested at tick j
      if (my < y + 16 && my + 8 > y) begin target = x + star * 24 + 1; break; end
      row_step(x, y, r, d);
    end
    if (target < 0 || target > 624) target = 312;
    // steer: ship_x moves in 5-pixel steps; stop within 2 pixels
    while (int'(dut.u_graphics.ship_x) > target + 2 && dut.u_graphics.ship_x != 0) begin
      left = 1; @(negedge clk);
    end
    left = 0;
    while (int'(dut.u_graphics.ship_x) < target - 2 && dut.u_graphics.ship_x != 10'(624)) begin
      right = 1; @(negedge clk);
    end
    right = 0;
    @(negedge clk); shoot = 1; @(negedge clk); shoot = 0;
    check(dut.pixel_y >= 10'(481) || dut.pixel_y < 10'(480), "launched in the same frame");
  endtask

  // ---------------------------------------------------------- scenario
  initial begin
    int kills0;
    repeat (4) @(negedge clk);
    not_reset = 1;
    // frame 0: colour census of the first picture
    wait (frames_done == 1);
    check(last_cyan == 24 * STAR_PIX + SHIP_PIX, $sformatf("cyan %0d", last_cyan));
    check(last_white == (2 * 12 + 8 + 5 * 12) * 4, $sformatf("white %0d", last_white));
    check(last_blue == 640 * 480 - last_cyan - last_white, $sformatf("blue %0d", last_blue));
    check(last_other == 0, "no other colours");
    check(last_ship_left == 312, $sformatf("ship at %0d", last_ship_left));
    // frame 1 runs through the frame buffer; read port B in its blanking
    wait (frames_done == 2);
    @(negedge clk);
    for (int a = 0; a < 320 * 240; a += 997) begin
      fb_raddr = 17'(a); @(negedge clk); @(negedge clk);
      fb_reads++;
      check(fb_rdata === pic[2 * (a / 320)][2 * (a % 320)], $sformatf("port B address %0d", a));
    end
    // star pixel through port B: star 0 of row 1 stands at x=101 in frame 1
    fb_raddr = 17'((40 + 4) / 2 * 320 + (102 / 2)); @(negedge clk); @(negedge clk);
    fb_reads++;
    check(fb_rdata === RGB_CYAN, "port B reads a star");
    check(fb_compares > 100000 && fb_errs == 0, $sformatf("frame buffer picture: %0d errors in %0d", fb_errs, fb_compares));
    fb_run = 0;
    // ship: 10 steps right
    hold(right, 10);
    wait_frames(2);
    check(last_ship_left == 312 + 50, $sformatf("ship after right: %0d", last_ship_left));
    // ship: to the left wall and beyond
    hold(left, 80);
    wait_frames(2);
    check(last_ship_left == 0, $sformatf("ship at left wall: %0d", last_ship_left));
    check(wall_clamps > 0, "wall reached");
    // leave one star (bottom row, star 7) and shoot it
    wait (dut.pixel_y == 10'(300));
    force dut.u_graphics.g_row[0].u_group.alive = 8'h00;
    force dut.u_graphics.g_row[1].u_group.alive = 8'h00;
    force dut.u_graphics.g_row[2].u_group.alive = 8'h80;
    @(negedge clk);
    release dut.u_graphics.g_row[0].u_group.alive;
    release dut.u_graphics.g_row[1].u_group.alive;
    release dut.u_graphics.g_row[2].u_group.alive;
    check(dut.u_graphics.g_row[2].alive == 8'h80 && !dut.u_graphics.restart, "one star left");
    wait_frames(2);
    check(last_cyan == STAR_PIX + SHIP_PIX, $sformatf("one star on screen: cyan %0d", last_cyan));
    for (int tries = 0; tries < 4 && level_steps == 0; tries++) begin
      aim_and_fire(7);
      wait (!dut.u_graphics.u_missile.active);
      repeat (4) @(negedge clk);   // restart follows the hit by one cycle
    end
    check(level_steps == 1, $sformatf("level steps %0d", level_steps));
    check(dut.u_graphics.level == 2 && dut.u_graphics.score == 2, "level 2, score 2");
    wait_frames(2);
    check(last_cyan == 24 * STAR_PIX + SHIP_PIX, $sformatf("rows refilled: cyan %0d", last_cyan));
    // level 002 and score 00002 ('2' has 11 font cells, '0' 12, '1' 8)
    check(last_white == (2 * 12 + 11 + 4 * 12 + 11) * 4, $sformatf("white at level 2: %0d", last_white));
    // global checks and mechanism census
    check(sync_errs == 0, $sformatf("sync errors %0d", sync_errs));
    check(blank_errs == 0, $sformatf("blanking errors %0d", blank_errs));
    check(ship_steps > 0, "ship steps");
    check(wall_clamps > 0, "wall clamps");
    check(shots > 0, "shots");
    check(kills >= 1, "destructions");
    check(level_steps > 0, "level steps");
    check(fb_compares > 0 && fb_reads > 0, "frame buffer used");
    $display("frames %0d: ship steps %0d, wall clamps %0d, shots %0d, destructions %0d, level steps %0d, fb pixels %0d, fb port-B reads %0d",
             frames_done, ship_steps, wall_clamps, shots, kills, level_steps, fb_compares, fb_reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
