// Space Invaders game for a 640 x 480 VGA screen: the top level.
//
// The player moves a ship along the bottom of the screen with two push
// buttons and shoots at three rows of stars with a third. Each star shot is
// worth 2 points; clearing all three rows brings them back and raises the
// level. There is no way to lose.
//
// Structure: vga_sync scans the raster and reports the pixel position and
// video_on; graphics holds the game and computes the colour of that pixel;
// the colour is registered once (fd_1) so that it leaves the chip in step
// with the registered hsync / vsync. The one shoot button drives both of
// the graphics unit's fire inputs (nes_a and nes_b).
//
// With USE_FRAME_BUFFER set, the picture goes through a 320 x 240 frame
// buffer instead: the pixel generator's output is written at half
// resolution (every even pixel of every even line), and the display reads
// it back, each stored pixel filling a 2 x 2 block, one frame later. Its
// second read port is brought out (fb_raddr / fb_rdata) for any other
// reader of the picture. In this mode hsync / vsync get one extra register
// to stay in step with the RAM's read latency. With USE_FRAME_BUFFER clear
// (the default) fb_rdata is 0.
//
// Ports: clk is the 50 MHz clock, not_reset an active-low synchronous reset;
// left, right and shoot are the (already clean, active-high) push buttons;
// rgb is the 3-bit colour, red in bit 2, blue in bit 0.
//
// The structure (main = graphics + VGA + fd_1) and the port list follow the
// document. The document also describes a 3-port frame buffer without
// saying how it is written or read; the connection made here is this
// design's.
module main
  import si_pkg::*;
#(
  parameter int unsigned DIVIDE_LIMIT     = 50_000_000,
  parameter bit          USE_FRAME_BUFFER = 1'b0,
  localparam int unsigned FB_W     = H_DISPLAY / 2,
  localparam int unsigned FB_H     = V_DISPLAY / 2,
  localparam int unsigned FB_ADDR_W = $clog2(FB_W * FB_H)
) (
  input  logic                 clk,
  input  logic                 not_reset,
  input  logic                 left,
  input  logic                 right,
  input  logic                 shoot,
  output rgb_t                 rgb,
  output logic                 hsync,
  output logic                 vsync,
  input  logic [FB_ADDR_W-1:0] fb_raddr,
  output rgb_t                 fb_rdata
);

  coord_t pixel_x, pixel_y;
  logic   video_on, ptick, hsync_vga, vsync_vga;
  rgb_t   graph_rgb, pixel_rgb;

  vga_sync u_vga (
    .clk, .not_reset, .hsync(hsync_vga), .vsync(vsync_vga), .video_on, .ptick,
    .pixel_x, .pixel_y
  );

  graphics #(.DIVIDE_LIMIT(DIVIDE_LIMIT)) u_graphics (
    .clk, .not_reset, .px_x(pixel_x), .px_y(pixel_y), .video_on,
    .nes_a(shoot), .nes_b(shoot), .nes_left(left), .nes_right(right),
    .rgb(graph_rgb),
    .score(), .level(), .shooting_sound(), .destruction_sound()
  );

  if (USE_FRAME_BUFFER) begin : g_fb
    logic [FB_ADDR_W-1:0] addr;
    rgb_t                 rd;
    logic                 hsync_d, vsync_d, video_on_d;

    // Address of the scanned pixel at half resolution.
    assign addr = FB_ADDR_W'(32'(pixel_y[COORD_W-1:1]) * FB_W + 32'(pixel_x[COORD_W-1:1]));

    frame_buffer #(.WIDTH(FB_W), .HEIGHT(FB_H), .DATA_W(3)) u_fb (
      .clk,
      .we(video_on && !pixel_x[0] && !pixel_y[0]),
      .waddr(addr), .wdata(graph_rgb),
      .raddr_a(addr), .rdata_a(rd),
      .raddr_b(fb_raddr), .rdata_b(fb_rdata)
    );

    always_ff @(posedge clk) begin
      hsync_d    <= hsync_vga;
      vsync_d    <= vsync_vga;
      video_on_d <= video_on;
    end

    assign pixel_rgb = video_on_d ? rd : RGB_BLACK;
    assign hsync     = hsync_d;
    assign vsync     = vsync_d;
  end else begin : g_direct
    assign pixel_rgb = graph_rgb;
    assign hsync     = hsync_vga;
    assign vsync     = vsync_vga;
    assign fb_rdata  = RGB_BLACK;
  end

  // fd_1: the output colour register.
  always_ff @(posedge clk) begin
    if (!not_reset) rgb <= RGB_BLACK;
    else            rgb <= pixel_rgb;
  end

endmodule
