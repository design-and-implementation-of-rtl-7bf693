// Testbench for score_level: +2 per destruction cycle, restart while all
// three rows are defeated, level +1 only when counter0 is 0.
module tb_score_level;
  logic clk = 0, not_reset = 0, destruction = 0, d1 = 0, d2 = 0, d3 = 0, counter0 = 0;
  logic restart;
  logic [15:0] score;
  logic [7:0] level;
  int checks = 0, failures = 0;
  int ref_score, ref_level;

  score_level dut (.clk, .not_reset, .destruction, .defeated1(d1), .defeated2(d2), .defeated3(d3),
                   .counter0, .restart, .score, .level);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    not_reset = 1;
    ref_score = 0; ref_level = 1;
    checks++; if (score !== 0 || level !== 1) begin failures++; $display("reset values"); end
    for (int i = 0; i < 3000; i++) begin
      destruction = ($urandom % 3) == 0;
      d1 = ($urandom % 2) == 0; d2 = ($urandom % 2) == 0; d3 = ($urandom % 2) == 0;
      counter0 = ($urandom % 4) == 0;
      #1;
      checks++;
      if (restart !== (d1 && d2 && d3)) begin failures++; $display("restart wrong"); end
      @(negedge clk);
      if (destruction) ref_score += 2;
      if (d1 && d2 && d3 && !counter0) ref_level++;
      checks++;
      if (score !== 16'(ref_score) || level !== 8'(ref_level)) begin
        failures++;
        if (failures < 10) $display("cycle %0d score %0d/%0d level %0d/%0d", i, score, ref_score, level, ref_level);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
