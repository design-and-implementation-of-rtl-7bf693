// Counter clock division: slows the 50 MHz clock down to a movement tick.
//
// A 26-bit accumulator 'divide' advances by DIVIDE_STEP every clock. When it
// reaches DIVIDE_LIMIT the 'compare' output goes high for one cycle and the
// accumulator restarts from zero on the next edge. On each compare pulse a
// free-running 25-bit 'counter' advances by COUNTER_STEP.
//
// With the defaults (step 2, limit 50,000,000) compare fires once every
// 25,000,001 cycles, i.e. about every 0.5 s at 50 MHz. The ship moves only on
// compare, and the level logic looks at counter[0].
//
// Interface: compare is combinational from the accumulator and lasts one
// cycle; counter changes on the edge where compare is high.
//
// The limit, both steps, the widths and the use of compare follow the
// document. Resetting 'counter' as well as 'divide' is this design's choice
// (so that counter[0] is a known 0 after reset).
module move_divider #(
  parameter int unsigned DIVIDE_LIMIT = 50_000_000,
  parameter int unsigned DIVIDE_STEP  = 2,
  parameter int unsigned COUNTER_STEP = 2,
  parameter int unsigned DIVIDE_W     = 26,
  parameter int unsigned COUNTER_W    = 25
) (
  input  logic                 clk,
  input  logic                 not_reset,
  output logic                 compare,
  output logic [COUNTER_W-1:0] counter
);

  logic [DIVIDE_W-1:0] divide;

  assign compare = (divide >= DIVIDE_W'(DIVIDE_LIMIT));

  always_ff @(posedge clk) begin
    if (!not_reset) begin
      divide  <= '0;
      counter <= '0;
    end else begin
      divide <= compare ? '0 : divide + DIVIDE_W'(DIVIDE_STEP);
      if (compare)
        counter <= counter + COUNTER_W'(COUNTER_STEP);
    end
  end

endmodule
