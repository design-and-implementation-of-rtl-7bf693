// Graphics unit: all of the game's state and its pixel generator.
//
// Game state, all clocked by the 50 MHz clock:
//   * move_divider turns the clock into a slow movement tick ('compare');
//   * ship_control moves the ship 5 pixels per tick under nes_left/nes_right;
//   * missile launches a shot on nes_a AND nes_b and flies it upwards;
//   * three alien_group rows of stars march across the screen and test the
//     missile for a hit once per frame;
//   * score_level adds 2 points per star shot ('destruction') and, when all
//     three rows are defeated, refills them and raises the level.
// A frame tick, one cycle long, is taken from the scan position: it fires
// when the raster reaches (0, 480), the first line below the picture, so the
// game moves during vertical blanking.
//
// Pixel generator: for the scanned pixel (px_x, px_y) it picks, in order of
// priority, white for the score board, yellow for the missile, cyan for the
// ship and for live stars, and blue for the background; black outside the
// visible area (video_on low). rgb is combinational from the pixel
// coordinate and the state registers; the caller registers it.
//
// The port names, the three star groups, the scoring, the shooting
// condition and the movement rule follow the document; colours other than
// the blue background and cyan stars, the sizes and the speeds are this
// design's choice.
module graphics
  import si_pkg::*;
#(
  parameter int unsigned DIVIDE_LIMIT = 50_000_000,
  parameter int unsigned N_STARS      = 8,
  parameter int unsigned SCORE_W      = 16,
  parameter int unsigned LEVEL_W      = 8
) (
  input  logic               clk,
  input  logic               not_reset,
  input  coord_t             px_x,
  input  coord_t             px_y,
  input  logic               video_on,
  input  logic               nes_a,
  input  logic               nes_b,
  input  logic               nes_left,
  input  logic               nes_right,
  output rgb_t               rgb,
  // Game status, for a score display or a sound unit outside.
  output logic [SCORE_W-1:0] score,
  output logic [LEVEL_W-1:0] level,
  output logic               shooting_sound,
  output logic               destruction_sound
);

  // -------------------------------------------------------- frame tick
  logic frame_pos, frame_pos_q, frame_tick;
  assign frame_pos = (px_x == '0) && (px_y == coord_t'(V_DISPLAY));
  always_ff @(posedge clk) begin
    if (!not_reset) frame_pos_q <= 1'b0;
    else            frame_pos_q <= frame_pos;
  end
  assign frame_tick = frame_pos && !frame_pos_q;

  // ------------------------------------------------------ ship movement
  logic        compare;
  logic [24:0] counter;
  coord_t      ship_x;

  move_divider #(.DIVIDE_LIMIT(DIVIDE_LIMIT)) u_divider (
    .clk, .not_reset, .compare, .counter
  );

  ship_control u_ship (
    .clk, .not_reset, .compare, .nes_left, .nes_right, .ship_x
  );

  // ----------------------------------------------------------- missile
  logic   mis_active, shot_fired, destruction;
  coord_t mis_x, mis_y;

  missile u_missile (
    .clk, .not_reset, .nes_a, .nes_b, .frame_tick, .hit(destruction),
    .ship_x, .active(mis_active), .mis_x, .mis_y, .shot_fired
  );

  // ------------------------------------------------------- star groups
  localparam int unsigned ROW_Y [3] = '{40, 64, 88};

  logic [2:0] grp_hit, grp_on, defeated;
  logic       restart;

  for (genvar g = 0; g < 3; g++) begin : g_row
    logic [N_STARS-1:0] alive;
    coord_t             master_x, master_y;
    hdir_t              state;
    vdir_t              state_v;

    alien_group #(.N_STARS(N_STARS), .Y_START(ROW_Y[g])) u_group (
      .clk, .not_reset, .restart, .frame_tick, .px_x, .px_y,
      .mis_active, .mis_x, .mis_y,
      .hit(grp_hit[g]), .star_on(grp_on[g]), .defeated(defeated[g]),
      .alive, .master_x, .master_y, .state, .state_v
    );
  end

  assign destruction = |grp_hit;

  score_level #(.SCORE_W(SCORE_W), .LEVEL_W(LEVEL_W)) u_score (
    .clk, .not_reset, .destruction,
    .defeated1(defeated[0]), .defeated2(defeated[1]), .defeated3(defeated[2]),
    .counter0(counter[0]), .restart, .score, .level
  );

  assign shooting_sound    = shot_fired;
  assign destruction_sound = destruction;

  // ---------------------------------------------------- pixel generator
  logic       text_on, ship_on, ship_pix, mis_on;
  logic [3:0] ship_row, ship_col;

  hud_text #(.SCORE_W(SCORE_W), .LEVEL_W(LEVEL_W)) u_hud (
    .px_x, .px_y, .score, .level, .text_on
  );

  assign ship_row = 4'(px_y - coord_t'(SHIP_Y));
  assign ship_col = 4'(px_x - ship_x);
  sprite_rom u_ship_rom (.kind(SPR_SHIP), .row(ship_row), .col(ship_col), .pixel(ship_pix));

  assign ship_on = (px_x >= ship_x) && (px_x < ship_x + coord_t'(SPRITE_W)) &&
                   (px_y >= coord_t'(SHIP_Y)) && (px_y < coord_t'(SHIP_Y + SPRITE_H)) &&
                   ship_pix;

  assign mis_on = mis_active &&
                  (px_x >= mis_x) && (px_x < mis_x + coord_t'(MISSILE_W)) &&
                  (px_y >= mis_y) && (px_y < mis_y + coord_t'(MISSILE_H));

  always_comb begin
    if (!video_on)    rgb = RGB_BLACK;
    else if (text_on) rgb = RGB_WHITE;
    else if (mis_on)  rgb = RGB_YELLOW;
    else if (ship_on) rgb = RGB_CYAN;
    else if (|grp_on) rgb = RGB_CYAN;
    else              rgb = RGB_BLUE;
  end

endmodule
