// Frame buffer: a block-RAM image memory with one write and two read ports.
//
// It holds WIDTH x HEIGHT pixels of DATA_W bits, 320 x 240 x 3 bits by
// default (28,800 bytes), addressed as y * WIDTH + x. All three ports are
// synchronous to clk: a write takes effect at the clock edge where we is
// high, and each read port returns, one cycle after its address, the word
// stored before that edge (read-before-write when a port reads the address
// being written).
//
// The document sets the size, the colour depth and the port count (two read,
// one write) of the frame buffer and places it in block RAM; the address
// layout and read-before-write behaviour are this design's choice.
module frame_buffer #(
  parameter int unsigned WIDTH  = 320,
  parameter int unsigned HEIGHT = 240,
  parameter int unsigned DATA_W = 3,
  localparam int unsigned DEPTH  = WIDTH * HEIGHT,
  localparam int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [ADDR_W-1:0] raddr_a,
  output logic [DATA_W-1:0] rdata_a,
  input  logic [ADDR_W-1:0] raddr_b,
  output logic [DATA_W-1:0] rdata_b
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && waddr < ADDR_W'(DEPTH))
      mem[waddr] <= wdata;
    rdata_a <= mem[raddr_a];
    rdata_b <= mem[raddr_b];
  end

endmodule
