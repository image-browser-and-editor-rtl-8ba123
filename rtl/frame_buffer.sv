// Frame buffer: one full 24-bit frame.
//
// A simple dual-port memory of WIDTH*HEIGHT rgb_t words. The display FSM
// writes the frame being built through the write port while the scan-out
// reads the other buffer; the read port is synchronous, data one clock
// after rd_addr. Pixel (x, y) is at y*WIDTH + x.
//
// Two such buffers, one shown and one being drawn, follow the design
// description; storing full 24-bit pixels (so that images with different
// colour tables can share a frame) and the one-cycle read latency are this
// design's choices.
module frame_buffer
  import img_pkg::*;
#(
  parameter int unsigned WIDTH  = 1024,
  parameter int unsigned HEIGHT = 768,
  localparam int unsigned DEPTH = WIDTH * HEIGHT,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] wr_addr,
  input  rgb_t          wr_data,
  input  logic [AW-1:0] rd_addr,
  output rgb_t          rd_data
);

  rgb_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end

endmodule
