// Testbench for frame_buffer: fills the 320 x 240 image with a pattern,
// reads it back on both ports, and checks the one-cycle read latency and
// read-before-write on a clash.
module tb_frame_buffer;
  localparam int W = 320, H = 240, AW = $clog2(W * H);
  logic clk = 0, we = 0;
  logic [AW-1:0] waddr = 0, raddr_a = 0, raddr_b = 0;
  logic [2:0] wdata = 0, rdata_a, rdata_b;
  int checks = 0, failures = 0;

  frame_buffer dut (.clk, .we, .waddr, .wdata, .raddr_a, .rdata_a, .raddr_b, .rdata_b);

  always #5 clk = ~clk;

  function automatic logic [2:0] pat(input int a); return 3'((a * 7 + a / 320) ^ (a >> 5)); endfunction

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    we = 1;
    for (int a = 0; a < W * H; a++) begin
      waddr = AW'(a); wdata = pat(a); @(negedge clk);
    end
    we = 0;
    // port A forwards, port B backwards
    for (int a = 0; a < W * H; a++) begin
      raddr_a = AW'(a); raddr_b = AW'(W * H - 1 - a);
      @(negedge clk);
      checks += 2;
      if (rdata_a !== pat(a)) failures++;
      if (rdata_b !== pat(W * H - 1 - a)) failures++;
    end
    // latency: data appears only after the clock edge
    raddr_a = 5; @(negedge clk); raddr_a = 6; #1;
    checks++; if (rdata_a !== pat(5)) failures++;
    // read-before-write on the same address
    we = 1; waddr = 1000; wdata = ~pat(1000); raddr_a = 1000; raddr_b = 1000;
    @(negedge clk); we = 0;
    checks++; if (rdata_a !== pat(1000)) begin failures++; $display("not read-before-write"); end
    @(negedge clk);
    checks++; if (rdata_a !== ~pat(1000) || rdata_b !== ~pat(1000)) begin failures++; $display("write lost"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
