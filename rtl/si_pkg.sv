// Shared constants and types of the Space Invaders game.
//
// The display is a 640 x 480 VGA raster scanned at a 25 MHz pixel rate,
// derived from the 50 MHz system clock by a pixel tick every second cycle.
// Horizontal and vertical timing use the standard 640 x 480 @ 60 Hz figures
// (800 x 525 total, active-low sync pulses); the document fixes the visible
// size and the clock, the porch widths are the usual industry values.
// Colours are 3 bits, one per primary, bit 2 = red, bit 1 = green,
// bit 0 = blue, so eight colours in all.
package si_pkg;

  // ------------------------------------------------------------------ VGA
  localparam int unsigned H_DISPLAY = 640;
  localparam int unsigned H_FRONT   = 16;
  localparam int unsigned H_SYNC    = 96;
  localparam int unsigned H_BACK    = 48;
  localparam int unsigned H_TOTAL   = H_DISPLAY + H_FRONT + H_SYNC + H_BACK; // 800

  localparam int unsigned V_DISPLAY = 480;
  localparam int unsigned V_FRONT   = 10;
  localparam int unsigned V_SYNC    = 2;
  localparam int unsigned V_BACK    = 33;
  localparam int unsigned V_TOTAL   = V_DISPLAY + V_FRONT + V_SYNC + V_BACK; // 525

  localparam int unsigned COORD_W = 10;
  typedef logic [COORD_W-1:0] coord_t;

  // --------------------------------------------------------------- colour
  typedef logic [2:0] rgb_t;
  localparam rgb_t RGB_BLACK  = 3'b000;
  localparam rgb_t RGB_BLUE   = 3'b001;
  localparam rgb_t RGB_CYAN   = 3'b011;
  localparam rgb_t RGB_YELLOW = 3'b110;
  localparam rgb_t RGB_WHITE  = 3'b111;

  // ------------------------------------------------------ game geometry
  localparam int unsigned SPRITE_W = 16;   // stars and ship are 16 x 16
  localparam int unsigned SPRITE_H = 16;
  localparam int unsigned SHIP_Y   = 440;  // top row of the ship
  localparam int unsigned MISSILE_W = 2;
  localparam int unsigned MISSILE_H = 8;

  typedef enum logic {DIR_RIGHT, DIR_LEFT} hdir_t;
  typedef enum logic {DIR_UP, DIR_DOWN}    vdir_t;
  typedef enum logic {SPR_STAR, SPR_SHIP}  sprite_t;

endpackage
