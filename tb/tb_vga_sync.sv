// Testbench for vga_sync: counts a whole frame and checks the line and frame
// lengths, the sync pulse widths and positions, and the visible area.
module tb_vga_sync;
  import si_pkg::*;
  logic clk = 0, not_reset = 0;
  logic hsync, vsync, video_on, ptick;
  coord_t pixel_x, pixel_y;
  int checks = 0, failures = 0;

  vga_sync dut (.clk, .not_reset, .hsync, .vsync, .video_on, .ptick, .pixel_x, .pixel_y);

  always #10 clk = ~clk;   // 50 MHz

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  int cyc, hs_low, vs_low, vis, hs_fall_cyc, prev_hs_fall, vs_fall_cyc, prev_vs_fall;
  int ticks, prev_x;
  logic hs_q, vs_q;
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk); not_reset = 1;
    // Two cycles per pixel: ptick alternates.
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      check(ptick == 1'(i % 2 == 0), "ptick alternates");
    end
    // Run for two full frames, measuring.
    cyc = 0; hs_low = 0; vs_low = 0; vis = 0; prev_hs_fall = -1; prev_vs_fall = -1;
    hs_q = hsync; vs_q = vsync; ticks = 0;
    repeat (2 * 800 * 525 * 2) begin
      @(negedge clk);
      cyc++;
      if (ptick) ticks++;
      if (!hsync) hs_low++;
      if (!vsync) vs_low++;
      if (video_on) vis++;
      check(video_on == (pixel_x < 640 && pixel_y < 480), "video_on matches area");
      check(pixel_x < 800 && pixel_y < 525, "counter range");
      if (hs_q && !hsync) begin
        if (prev_hs_fall >= 0) check(cyc - prev_hs_fall == 1600, "line length 800 pixels");
        prev_hs_fall = cyc;
      end
      if (vs_q && !vsync) begin
        if (prev_vs_fall >= 0) check(cyc - prev_vs_fall == 1600 * 525, "frame length 525 lines");
        prev_vs_fall = cyc;
      end
      hs_q = hsync; vs_q = vsync;
    end
    // Over two frames: 96 pixels of hsync per line, 2 lines of vsync per frame.
    check(hs_low == 2 * 525 * 96 * 2, $sformatf("hsync low cycles %0d", hs_low));
    check(vs_low == 2 * 2 * 800 * 2, $sformatf("vsync low cycles %0d", vs_low));
    check(vis == 2 * 640 * 480 * 2, $sformatf("visible cycles %0d", vis));
    check(ticks == 800 * 525 * 2, $sformatf("pixel ticks %0d", ticks));
    check(prev_vs_fall > 0, "vsync seen");
    // hsync is low exactly during pixels 656..751 (one cycle late, registered)
    wait (pixel_x == 656 && ptick == 1'b0 && pixel_y == 10);
    @(posedge clk); @(negedge clk); check(!hsync, "hsync low one cycle after pixel 656 begins");
    wait (pixel_x == 655);
    @(negedge clk); check(hsync, "hsync high at pixel 655");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
