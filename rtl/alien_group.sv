// Alien (star) group: one row of stars that marches across the screen and
// can be shot.
//
// The row holds N_STARS stars, SPACING pixels apart, placed relative to a
// master coordinate (master_x, master_y). On every frame tick:
//   * collision: if the missile's box overlaps a live star's 16 x 16 box,
//     that star is cleared from 'alive' and 'hit' pulses for this cycle;
//   * movement: the row moves H_STEP pixels in its horizontal direction.
//     When the next step would cross X_MIN or X_MAX, the horizontal
//     direction flips instead, and the row moves V_STEP pixels in its
//     vertical direction (down or up), after which that direction flips,
//     so the row swings between two heights.
// 'defeated' is high when no star of the row is alive. 'restart' brings all
// stars back at the start position. For display, star_on is high when the
// scanned pixel (px_x, px_y) falls on a painted pixel of a live star.
//
// Interface: hit is combinational from the current state and valid in the
// cycle where frame_tick is high; everything else is registered or decoded
// from registers. restart wins over frame_tick.
//
// The document gives three such groups (defeated1..3), their per-group
// horizontal state (right/left), vertical state (up/down) and master
// coordinate; the star count, spacing, speeds and bounds are this design's
// choice, read off the game screen.
module alien_group
  import si_pkg::*;
#(
  parameter int unsigned N_STARS = 8,
  parameter int unsigned SPACING = 24,
  parameter int unsigned X_START = 100,
  parameter int unsigned Y_START = 40,
  parameter int unsigned X_MIN   = 8,
  parameter int unsigned X_MAX   = H_DISPLAY - 8,
  parameter int unsigned H_STEP  = 1,
  parameter int unsigned V_STEP  = 8
) (
  input  logic               clk,
  input  logic               not_reset,
  input  logic               restart,
  input  logic               frame_tick,
  input  coord_t             px_x,
  input  coord_t             px_y,
  input  logic               mis_active,
  input  coord_t             mis_x,
  input  coord_t             mis_y,
  output logic               hit,
  output logic               star_on,
  output logic               defeated,
  output logic [N_STARS-1:0] alive,
  output coord_t             master_x,
  output coord_t             master_y,
  output hdir_t              state,
  output vdir_t              state_v
);

  localparam int unsigned GROUP_W = (N_STARS - 1) * SPACING + SPRITE_W;
  typedef logic [COORD_W:0] wide_t;   // one bit more: no overflow at the edge

  // ---------------------------------------------------------- collision
  logic [N_STARS-1:0] hit_vec, kill;
  logic               rows_overlap;

  assign rows_overlap = (wide_t'(mis_y) + wide_t'(MISSILE_H) > wide_t'(master_y)) &&
                        (wide_t'(mis_y) < wide_t'(master_y) + wide_t'(SPRITE_H));

  always_comb begin
    hit_vec = '0;
    for (int i = 0; i < N_STARS; i++) begin
      automatic wide_t x0 = wide_t'(master_x) + wide_t'(i * SPACING);
      hit_vec[i] = alive[i] && mis_active && rows_overlap &&
                   (wide_t'(mis_x) + wide_t'(MISSILE_W) > x0) &&
                   (wide_t'(mis_x) < x0 + wide_t'(SPRITE_W));
    end
    kill = hit_vec & (~hit_vec + 1'b1);   // lowest set bit: one star per shot
  end

  assign hit = frame_tick && (|hit_vec);

  // ----------------------------------------------------------- movement
  always_ff @(posedge clk) begin
    if (!not_reset || restart) begin
      alive    <= '1;
      master_x <= coord_t'(X_START);
      master_y <= coord_t'(Y_START);
      state    <= DIR_RIGHT;
      state_v  <= DIR_DOWN;
    end else if (frame_tick) begin
      alive <= alive & ~kill;
      if ((state == DIR_RIGHT &&
           wide_t'(master_x) + wide_t'(GROUP_W + H_STEP) > wide_t'(X_MAX)) ||
          (state == DIR_LEFT && wide_t'(master_x) < wide_t'(X_MIN + H_STEP))) begin
        state    <= (state == DIR_RIGHT) ? DIR_LEFT : DIR_RIGHT;
        state_v  <= (state_v == DIR_DOWN) ? DIR_UP : DIR_DOWN;
        master_y <= (state_v == DIR_DOWN) ? master_y + coord_t'(V_STEP)
                                          : master_y - coord_t'(V_STEP);
      end else if (state == DIR_RIGHT) begin
        master_x <= master_x + coord_t'(H_STEP);
      end else begin
        master_x <= master_x - coord_t'(H_STEP);
      end
    end
  end

  assign defeated = ~|alive;

  // ------------------------------------------------------------ display
  logic       in_col, in_row, pix;
  logic [3:0] rel_x, rel_y;

  always_comb begin
    in_col = 1'b0;
    rel_x  = '0;
    for (int i = 0; i < N_STARS; i++) begin
      automatic wide_t x0 = wide_t'(master_x) + wide_t'(i * SPACING);
      if (alive[i] && wide_t'(px_x) >= x0 && wide_t'(px_x) < x0 + wide_t'(SPRITE_W)) begin
        in_col = 1'b1;
        rel_x  = 4'(wide_t'(px_x) - x0);
      end
    end
    in_row = (px_y >= master_y) && (wide_t'(px_y) < wide_t'(master_y) + wide_t'(SPRITE_H));
    rel_y  = 4'(px_y - master_y);
  end

  sprite_rom u_star (.kind(SPR_STAR), .row(rel_y), .col(rel_x), .pixel(pix));

  assign star_on = in_col && in_row && pix;

endmodule
