// Full-size testbench for main: every parameter at its default (50 MHz
// clock, movement tick every 25,000,001 cycles, direct colour path).
//
// One complete round of play on the VGA outputs: the first picture is
// checked pixel by pixel against counts of each colour worked out from the
// sprite and font drawings, and sync / blanking are checked on every cycle.
// The right button is held until the ship has taken one 5-pixel step (about
// 30 frames at full size). Then, once per frame, the player predicts
// whether a missile fired now would meet a live star of the bottom row and
// fires when it would; the star's destruction must show as score 00002 and
// one star fewer on the screen.
module tb_main_full;
  import si_pkg::*;
  localparam int STAR_PIX = 144, SHIP_PIX = 126;
  localparam int LINE = 800 * 2, FRAME = 525 * LINE;

  logic clk = 0, not_reset = 0, left = 0, right = 0, shoot = 0;
  rgb_t rgb, fb_rdata;
  logic hsync, vsync;
  int checks = 0, failures = 0;

  main dut (.clk, .not_reset, .left, .right, .shoot, .rgb, .hsync, .vsync,
            .fb_raddr(17'd0), .fb_rdata);

  always #10 clk = ~clk;

  initial begin : watchdog
    repeat (250 * FRAME) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // raster position of the colour now on the outputs
  int x = 0, y = 0, sub = 0, started = 0;
  int cnt_cyan = 0, cnt_white = 0, cnt_blue = 0, cnt_other = 0, ship_left = 9999;
  int last_cyan, last_white, last_blue, last_other, last_ship_left, frames_done = 0;
  int sync_errs = 0, blank_errs = 0;

  int n = 0;                                  // clock edges since reset
  always @(posedge clk) if (not_reset) begin started = 1; n++; end

  always @(negedge clk) if (started) begin
    if (hsync !== !(x >= 656 && x < 752) || vsync !== !(y >= 490 && y < 492)) sync_errs++;
    if (x < 640 && y < 480) begin
      if (sub == 0) begin
        case (rgb)
          RGB_CYAN: cnt_cyan++;
          RGB_WHITE: cnt_white++;
          RGB_BLUE: cnt_blue++;
          default: cnt_other++;
        endcase
        if (y == 451 && rgb == RGB_CYAN && x < ship_left) ship_left = x;
      end
    end else if (rgb !== RGB_BLACK) blank_errs++;
    if (x == 639 && y == 479 && sub == 1) begin
      last_cyan = cnt_cyan; last_white = cnt_white; last_blue = cnt_blue; last_other = cnt_other;
      last_ship_left = ship_left;
      cnt_cyan = 0; cnt_white = 0; cnt_blue = 0; cnt_other = 0; ship_left = 9999;
      frames_done++;
    end
    sub = 1 - sub;
    if (sub == 0) begin x = (x == 799) ? 0 : x + 1; if (x == 0) y = (y == 524) ? 0 : y + 1; end
  end

  task automatic wait_frames(input int k);
    int target;
    target = frames_done + k;
    wait (frames_done >= target);
  endtask

  // Would a missile launched now from ship_x meet a live star of the bottom
  // row? Steps a reference model of the row's march (bounds 8..632, width
  // 184, 1 pixel per frame, 8-pixel swing at each bounce) frame by frame.
  function automatic bit shot_hits(input int ship_x, input int rx, input int ry, input bit r,
                                   input bit d, input logic [7:0] alive);
    int mx;
    mx = ship_x + 7;
    for (int j = 1; j < 200; j++) begin
      int my;
      my = 432 - 4 * (j - 1);
      if (my < ry + 16 && my + 8 > ry) begin
        for (int s = 0; s < 8; s++)
          if (alive[s] && mx + 2 > rx + 24 * s && mx < rx + 24 * s + 16) return 1;
        return 0;
      end
      if (r && rx + 185 > 632 || !r && rx < 9) begin
        r = !r; ry = d ? ry + 8 : ry - 8; d = !d;
      end else rx = r ? rx + 1 : rx - 1;
    end
    return 0;
  endfunction

  initial begin
    int waited;
    bit fired;
    repeat (4) @(negedge clk);
    not_reset = 1;
    wait (frames_done == 1);
    check(last_cyan == 24 * STAR_PIX + SHIP_PIX, $sformatf("cyan %0d", last_cyan));
    check(last_white == (2 * 12 + 8 + 5 * 12) * 4, $sformatf("white %0d", last_white));
    check(last_blue == 640 * 480 - last_cyan - last_white && last_other == 0, "blue and nothing else");
    check(last_ship_left == 312, $sformatf("ship at %0d", last_ship_left));
    // one movement tick at full size: 25,000,001 cycles
    // compare is high after edge 25,000,000 (divide reaches 50,000,000)
    right = 1;
    while (!dut.u_graphics.compare) @(negedge clk);
    waited = n;
    @(negedge clk); right = 0;
    check(waited == 25_000_000, $sformatf("first movement tick after %0d cycles", waited));
    wait_frames(2);
    check(last_ship_left == 317, $sformatf("ship after one step: %0d", last_ship_left));
    // fire when the prediction says the missile will meet a star
    fired = 0;
    for (int f = 0; f < 40 && !fired; f++) begin
      wait (dut.pixel_y == 10'(481));
      if (shot_hits(int'(dut.u_graphics.ship_x),
                    int'(dut.u_graphics.g_row[2].master_x), int'(dut.u_graphics.g_row[2].master_y),
                    dut.u_graphics.g_row[2].state == DIR_RIGHT, dut.u_graphics.g_row[2].state_v == DIR_DOWN,
                    dut.u_graphics.g_row[2].alive)) begin
        @(negedge clk); shoot = 1; @(negedge clk); shoot = 0;
        fired = 1;
      end
      wait (dut.pixel_y == 10'(0));
    end
    check(fired, "found a firing moment");
    wait (!dut.u_graphics.u_missile.active);
    wait_frames(2);
    check(dut.u_graphics.score == 2, "score register 2");
    check(last_white == (2 * 12 + 8 + 4 * 12 + 11) * 4, $sformatf("score 00002 on screen: white %0d", last_white));
    check(last_cyan == 23 * STAR_PIX + SHIP_PIX, $sformatf("one star gone: cyan %0d", last_cyan));
    check(sync_errs == 0 && blank_errs == 0, $sformatf("sync errors %0d, blanking errors %0d", sync_errs, blank_errs));
    $display("frames %0d", frames_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
