// Score and level logic.
//
// score grows by 2 on every cycle in which 'destruction' is high (one cycle
// per star shot). When all three star groups are defeated at once, 'restart'
// is raised for that cycle, telling the groups to bring their stars back,
// and, if counter[0] is 0, the level grows by 1 on the same clock edge.
//
// Interface: restart is combinational from the defeated inputs so that the
// groups refill on the very edge the level advances; because of that the
// level advances exactly once per cleared screen. score and level are
// registers; reset clears the score and sets the level to 1. Both wrap at
// their width.
//
// The +2 per star, the +1 per cleared screen, the counter[0] condition and
// the three defeated inputs follow the document. The widths and the choice
// to hand restart to the groups combinationally are this design's.
module score_level #(
  parameter int unsigned SCORE_W = 16,
  parameter int unsigned LEVEL_W = 8
) (
  input  logic               clk,
  input  logic               not_reset,
  input  logic               destruction,
  input  logic               defeated1,
  input  logic               defeated2,
  input  logic               defeated3,
  input  logic               counter0,
  output logic               restart,
  output logic [SCORE_W-1:0] score,
  output logic [LEVEL_W-1:0] level
);

  wire all_defeated = defeated1 && defeated2 && defeated3;

  assign restart = all_defeated;

  always_ff @(posedge clk) begin
    if (!not_reset) begin
      score <= '0;
      level <= LEVEL_W'(1);
    end else begin
      if (destruction)
        score <= score + SCORE_W'(2);
      if (all_defeated && !counter0)
        level <= level + 1'b1;
    end
  end

endmodule
