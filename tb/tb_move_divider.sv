// Testbench for move_divider: checks the compare period and the counter steps
// against a reference model of the accumulator, with a small limit.
module tb_move_divider;
  localparam int unsigned LIMIT = 20;
  logic clk = 0, not_reset = 0;
  logic compare;
  logic [24:0] counter;
  int checks = 0, failures = 0;

  move_divider #(.DIVIDE_LIMIT(LIMIT)) dut (.clk, .not_reset, .compare, .counter);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned ref_div, ref_cnt, ticks, last_tick, cyc;
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk); not_reset = 1;
    ref_div = 0; ref_cnt = 0; ticks = 0; last_tick = 0; cyc = 0;
    repeat (500) begin
      @(negedge clk);
      cyc++;
      // model of the edge that just passed
      if (ref_div >= LIMIT) begin ref_div = 0; ref_cnt += 2; end
      else ref_div += 2;
      checks++;
      if (compare !== (ref_div >= LIMIT) || counter !== 25'(ref_cnt)) begin
        failures++;
        $display("mismatch cyc %0d: compare %0b counter %0d, expected %0b %0d",
                 cyc, compare, counter, ref_div >= LIMIT, ref_cnt);
      end
      if (compare) begin
        // compare must recur every LIMIT/STEP + 1 cycles
        if (ticks > 0) begin
          checks++;
          if (cyc - last_tick != LIMIT / 2 + 1) begin
            failures++;
            $display("period %0d, expected %0d", cyc - last_tick, LIMIT / 2 + 1);
          end
        end
        ticks++;
        last_tick = cyc;
      end
    end
    checks++;
    if (ticks < 20) failures++;
    // reset clears both counters
    not_reset = 0; @(negedge clk); checks++;
    if (counter !== 0 || compare !== 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
