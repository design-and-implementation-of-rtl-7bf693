// Missile: one shot at a time, fired from the ship and flying upwards.
//
// The fire request is nes_a AND nes_b (on the board both are wired to the
// one shoot button). When the missile is idle, a fire request launches it
// from the ship's nose: x centred on the ship, y just above it. On every
// frame tick an active missile climbs SPEED pixels; it disappears when it
// would leave the top of the screen or when the star logic reports a hit.
// shot_fired pulses for one cycle at each launch.
//
// Interface: hit and frame_tick are single-cycle pulses; hit wins over
// movement. active, mis_x and mis_y are registers.
//
// The document gives the fire condition (nes_a and nes_b); the missile size,
// speed, one-shot-at-a-time rule and launch point are this design's choice.
module missile
  import si_pkg::*;
#(
  parameter int unsigned SPEED = 4
) (
  input  logic   clk,
  input  logic   not_reset,
  input  logic   nes_a,
  input  logic   nes_b,
  input  logic   frame_tick,
  input  logic   hit,
  input  coord_t ship_x,
  output logic   active,
  output coord_t mis_x,
  output coord_t mis_y,
  output logic   shot_fired
);

  wire fire = nes_a && nes_b;

  always_ff @(posedge clk) begin
    if (!not_reset) begin
      active <= 1'b0;
      mis_x  <= '0;
      mis_y  <= '0;
    end else if (active) begin
      if (hit)
        active <= 1'b0;
      else if (frame_tick) begin
        if (mis_y < coord_t'(SPEED)) active <= 1'b0;
        else                         mis_y  <= mis_y - coord_t'(SPEED);
      end
    end else if (fire) begin
      active <= 1'b1;
      mis_x  <= ship_x + coord_t'(SPRITE_W / 2 - MISSILE_W / 2);
      mis_y  <= coord_t'(SHIP_Y - MISSILE_H);
    end
  end

  assign shot_fired = fire && !active;

endmodule
