// Testbench for alien_group: follows the row's march over many frames with a
// reference model, shoots every star in turn (and misses on purpose), and
// checks the hit pulse, the alive mask, 'defeated', restart and the
// star_on pixel output.
module tb_alien_group;
  import si_pkg::*;
  logic clk = 0, not_reset = 0, restart = 0, frame_tick = 0, mis_active = 0;
  coord_t px_x = 0, px_y = 0, mis_x = 0, mis_y = 0;
  logic hit, star_on, defeated;
  logic [7:0] alive;
  coord_t master_x, master_y;
  hdir_t state;
  vdir_t state_v;
  int checks = 0, failures = 0;
  int rx, ry, bounces;
  bit rright, rdown;
  logic [7:0] ralive;

  alien_group dut (.clk, .not_reset, .restart, .frame_tick, .px_x, .px_y, .mis_active, .mis_x, .mis_y,
                   .hit, .star_on, .defeated, .alive, .master_x, .master_y, .state, .state_v);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // reference movement for one frame: row 184 pixels wide, bounds 8 .. 632
  task automatic model_step();
    if (rright && rx + 184 + 1 > 632 || !rright && rx < 8 + 1) begin
      rright = !rright;
      ry = rdown ? ry + 8 : ry - 8;
      rdown = !rdown;
      bounces++;
    end else rx = rright ? rx + 1 : rx - 1;
  endtask

  task automatic compare_state();
    check(master_x == coord_t'(rx) && master_y == coord_t'(ry), $sformatf("pos %0d,%0d exp %0d,%0d", master_x, master_y, rx, ry));
    check((state == DIR_RIGHT) == rright && (state_v == DIR_DOWN) == rdown, "direction states");
    check(alive == ralive, $sformatf("alive %b exp %b", alive, ralive));
    check(defeated == (ralive == 0), "defeated");
  endtask

  // one frame tick; returns whether hit pulsed
  task automatic frame(output bit h);
    frame_tick = 1; #1 h = hit; @(negedge clk); frame_tick = 0;
    model_step();
    compare_state();
  endtask

  initial begin
    bit h;
    repeat (2) @(negedge clk);
    not_reset = 1;
    rx = 100; ry = 40; rright = 1; rdown = 1; ralive = '1; bounces = 0;
    compare_state();
    // march for 1400 frames without a missile: several bounces, up and down
    for (int i = 0; i < 1400; i++) begin frame(h); check(!h, "no hit without missile"); end
    check(bounces >= 3, $sformatf("bounces %0d", bounces));
    // star_on: centre of star 3 lit, its corner dark, the gap dark
    px_x = coord_t'(rx + 3 * 24 + 7); px_y = coord_t'(ry + 7); #1 check(star_on, "star centre lit");
    px_x = coord_t'(rx + 3 * 24);     px_y = coord_t'(ry);     #1 check(!star_on, "star corner dark");
    px_x = coord_t'(rx + 3 * 24 + 18); px_y = coord_t'(ry + 7); #1 check(!star_on, "gap dark");
    px_x = coord_t'(rx + 0);           px_y = coord_t'(ry + 4); #1 check(star_on, "left point of star 0");
    // a missile in the gap between stars 2 and 3 misses
    mis_active = 1; mis_x = coord_t'(rx + 2 * 24 + 17); mis_y = coord_t'(ry + 4);
    frame(h); check(!h, "miss in gap");
    // a missile above the row misses
    mis_x = coord_t'(rx + 5); mis_y = coord_t'(ry - 9);
    frame(h); check(!h, "miss above row");
    // shoot every star, out of order
    foreach (ralive[k]) begin
      int s;
      s = (k * 5) % 8;
      mis_x = coord_t'(rx + s * 24 + 6); mis_y = coord_t'(ry + 10);
      frame_tick = 1; #1 h = hit; @(negedge clk); frame_tick = 0;
      ralive[s] = 1'b0;
      model_step();
      check(h, $sformatf("hit star %0d", s));
      compare_state();
      // the same spot again: star is gone, no hit
      mis_x = coord_t'(rx + s * 24 + 6); mis_y = coord_t'(ry + 10);
      frame(h); check(!h, "dead star not hit twice");
      px_x = coord_t'(rx + s * 24 + 7); px_y = coord_t'(ry + 7); #1 check(!star_on, "dead star dark");
    end
    mis_active = 0;
    check(defeated, "all shot: defeated");
    // hit only reported while frame_tick is high
    restart = 1; @(negedge clk); restart = 0;
    rx = 100; ry = 40; rright = 1; rdown = 1; ralive = '1;
    compare_state();
    mis_active = 1; mis_x = coord_t'(rx + 6); mis_y = coord_t'(ry + 10); #1;
    check(!hit, "no hit without frame tick");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
