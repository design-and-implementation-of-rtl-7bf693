// Testbench for ship_control: random button presses and movement ticks,
// compared with a reference position model including the screen clamps.
module tb_ship_control;
  import si_pkg::*;
  logic clk = 0, not_reset = 0, compare = 0, nes_left = 0, nes_right = 0;
  coord_t ship_x;
  int checks = 0, failures = 0;
  int ref_x, hit_left_wall = 0, hit_right_wall = 0;

  ship_control dut (.clk, .not_reset, .compare, .nes_left, .nes_right, .ship_x);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); not_reset = 1;
    ref_x = 312;
    checks++; if (ship_x !== 10'(ref_x)) failures++;
    for (int i = 0; i < 8000; i++) begin
      // long runs in one direction so both walls are reached
      compare   = ($urandom % 3) == 0;
      nes_right = (i / 1000) % 2 == 0 ? ($urandom % 4 != 0) : ($urandom % 8 == 0);
      nes_left  = ($urandom % 4 == 0) ^ ((i / 1000) % 2 == 1);
      @(negedge clk);
      if (compare && nes_right)     ref_x = (ref_x + 5 > 624) ? 624 : ref_x + 5;
      else if (compare && nes_left) ref_x = (ref_x - 5 < 0) ? 0 : ref_x - 5;
      if (ref_x == 0) hit_left_wall++;
      if (ref_x == 624) hit_right_wall++;
      checks++;
      if (ship_x !== 10'(ref_x)) begin
        failures++;
        if (failures < 10) $display("cycle %0d: ship_x %0d expected %0d", i, ship_x, ref_x);
      end
    end
    checks++;
    if (hit_left_wall == 0 || hit_right_wall == 0) begin
      failures++; $display("walls not reached: %0d %0d", hit_left_wall, hit_right_wall);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
