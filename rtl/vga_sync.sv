// VGA controller: scans a 640 x 480 raster and produces the sync pulses.
//
// A one-bit toggle divides the 50 MHz clock by two to a 25 MHz pixel tick
// (ptick). On each tick the horizontal counter advances through 800 pixel
// periods per line; at the end of a line the vertical counter advances
// through 525 lines per frame. hsync is low during pixel periods 656..751,
// vsync during lines 490..491, and video_on is high while the beam is inside
// the visible 640 x 480 area. pixel_x / pixel_y are the current counters.
//
// Timing: the counters, hsync and vsync are registers that change on the
// clock edge where ptick is high; video_on is decoded from the counters in
// the same cycle, so a pixel generator that registers its colour once lines
// up with hsync / vsync.
//
// The document sets the visible size (640 x 480) and the 50 MHz clock, and
// names the ports pixel_x, pixel_y, hsync, vsync, video_on and ptick. The
// porch widths and the active-low sync polarity are the standard 60 Hz mode.
module vga_sync
  import si_pkg::*;
(
  input  logic   clk,
  input  logic   not_reset,   // active low, synchronous
  output logic   hsync,
  output logic   vsync,
  output logic   video_on,
  output logic   ptick,
  output coord_t pixel_x,
  output coord_t pixel_y
);

  logic   tick_q;
  coord_t h_cnt, v_cnt;
  logic   hsync_q, vsync_q;

  wire h_end = (h_cnt == coord_t'(H_TOTAL - 1));
  wire v_end = (v_cnt == coord_t'(V_TOTAL - 1));

  always_ff @(posedge clk) begin
    if (!not_reset) begin
      tick_q  <= 1'b0;
      h_cnt   <= '0;
      v_cnt   <= '0;
      hsync_q <= 1'b1;
      vsync_q <= 1'b1;
    end else begin
      tick_q <= ~tick_q;
      if (tick_q) begin
        if (h_end) begin
          h_cnt <= '0;
          v_cnt <= v_end ? '0 : v_cnt + 1'b1;
        end else begin
          h_cnt <= h_cnt + 1'b1;
        end
      end
      // Sync decoded from the counters and registered: it trails the
      // counters by one cycle, as does the registered colour in main.
      hsync_q <= !((h_cnt >= coord_t'(H_DISPLAY + H_FRONT)) &&
                   (h_cnt <  coord_t'(H_DISPLAY + H_FRONT + H_SYNC)));
      vsync_q <= !((v_cnt >= coord_t'(V_DISPLAY + V_FRONT)) &&
                   (v_cnt <  coord_t'(V_DISPLAY + V_FRONT + V_SYNC)));
    end
  end

  assign ptick    = tick_q;
  assign pixel_x  = h_cnt;
  assign pixel_y  = v_cnt;
  assign hsync    = hsync_q;
  assign vsync    = vsync_q;
  assign video_on = (h_cnt < coord_t'(H_DISPLAY)) && (v_cnt < coord_t'(V_DISPLAY));

endmodule
