// Ship position: moves the ship left or right in steps, kept on screen.
//
// On every movement tick (compare from move_divider) the ship's x position
// moves STEP pixels right while nes_right is held, or STEP pixels left while
// nes_left is held; right wins when both are held. The position is clamped
// to 0 .. X_MAX so the ship cannot leave the screen. After reset the ship
// sits at X_START.
//
// Interface: ship_x is a register that changes on the edge where compare
// and a button are high.
//
// The 5-pixel step, the priority of right over left and the gating by
// compare follow the document; the clamping range and the start position
// are this design's choice (the document only says the ship is not allowed
// to move out of the screen).
module ship_control
  import si_pkg::*;
#(
  parameter int unsigned STEP    = 5,
  parameter int unsigned X_MAX   = H_DISPLAY - SPRITE_W,
  parameter int unsigned X_START = (H_DISPLAY - SPRITE_W) / 2
) (
  input  logic   clk,
  input  logic   not_reset,
  input  logic   compare,
  input  logic   nes_left,
  input  logic   nes_right,
  output coord_t ship_x
);

  coord_t x_next;

  always_comb begin
    x_next = ship_x;
    if (compare && nes_right)
      x_next = (ship_x >= coord_t'(X_MAX - STEP)) ? coord_t'(X_MAX) : ship_x + coord_t'(STEP);
    else if (compare && nes_left)
      x_next = (ship_x <= coord_t'(STEP)) ? '0 : ship_x - coord_t'(STEP);
  end

  always_ff @(posedge clk) begin
    if (!not_reset) ship_x <= coord_t'(X_START);
    else            ship_x <= x_next;
  end

endmodule
