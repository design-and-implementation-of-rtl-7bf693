// Testbench for missile: launch only on nes_a AND nes_b while idle, launch
// position, upward flight per frame tick, exit at the top and stop on a hit.
module tb_missile;
  import si_pkg::*;
  logic clk = 0, not_reset = 0, nes_a = 0, nes_b = 0, frame_tick = 0, hit = 0;
  coord_t ship_x = 100, mis_x, mis_y;
  logic active, shot_fired;
  int checks = 0, failures = 0, launches = 0;

  missile dut (.clk, .not_reset, .nes_a, .nes_b, .frame_tick, .hit, .ship_x,
               .active, .mis_x, .mis_y, .shot_fired);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic tick(); frame_tick = 1; @(negedge clk); frame_tick = 0; @(negedge clk); endtask

  initial begin
    repeat (2) @(negedge clk);
    not_reset = 1; @(negedge clk);
    check(!active, "idle after reset");
    // one fire input alone does nothing
    nes_a = 1; @(negedge clk); check(!active && !shot_fired, "nes_a alone");
    nes_a = 0; nes_b = 1; @(negedge clk); check(!active, "nes_b alone");
    // both: launch from the ship's nose
    nes_a = 1; #1 check(shot_fired, "shot_fired pulse");
    @(negedge clk); nes_a = 0; nes_b = 0;
    check(active, "launched");
    check(mis_x == 100 + 8 - 1, $sformatf("launch x %0d", mis_x));
    check(mis_y == 440 - 8, $sformatf("launch y %0d", mis_y));
    // no movement without a tick
    repeat (5) @(negedge clk);
    check(mis_y == 432, "still without tick");
    // a second fire while in flight is ignored
    ship_x = 300; nes_a = 1; nes_b = 1; #1 check(!shot_fired, "no second shot");
    @(negedge clk); nes_a = 0; nes_b = 0;
    check(mis_x == 107, "x kept while in flight");
    // climbs 4 per tick
    for (int i = 1; i <= 10; i++) begin
      tick();
      check(mis_y == 10'(432 - 4 * i), $sformatf("y after %0d ticks: %0d", i, mis_y));
    end
    // a hit ends the flight
    hit = 1; @(negedge clk); hit = 0;
    check(!active, "hit ends flight");
    // fly to the top: 432/4 = 108 ticks to y=0, one more to leave
    nes_a = 1; nes_b = 1; @(negedge clk); nes_a = 0; nes_b = 0;
    check(active && mis_x == 307, "relaunch from new ship position");
    for (int i = 0; i < 108; i++) tick();
    check(active && mis_y == 0, $sformatf("at top y=%0d", mis_y));
    tick();
    check(!active, "left the screen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
