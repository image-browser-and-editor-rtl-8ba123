// Image RAM: the pixel arrays of all image slots.
//
// NUM_IMAGES slots of IMG_W*IMG_H 8-bit colour indices, one write port for
// the image decoder and NUM_RD synchronous read ports for the display FSM
// (four, so that bilinear interpolation can fetch a 2x2 neighbourhood every
// clock), all in the video clock domain. Slot s, row y, column x is at address
// s*IMG_W*IMG_H + y*IMG_W + x. Read data appears one clock after its rd_addr.
// Written as a plain array so that a synthesiser can map it to block RAM.
//
// Four slots of the largest image, 1024x768 at 8 bits per pixel, follow the
// design description; the number of read ports and their latency are this
// design's choices. On an FPGA the four read ports mean four copies of the
// block RAM (or a memory clocked four times faster).
module image_ram #(
  parameter int unsigned NUM_IMAGES = 4,
  parameter int unsigned IMG_W      = 1024,
  parameter int unsigned IMG_H      = 768,
  parameter int unsigned NUM_RD     = 4,
  localparam int unsigned DEPTH     = NUM_IMAGES * IMG_W * IMG_H,
  localparam int unsigned AW        = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] wr_addr,
  input  logic [7:0]    wr_data,
  input  logic [NUM_RD-1:0][AW-1:0] rd_addr,
  output logic [NUM_RD-1:0][7:0]    rd_data
);

  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[wr_addr] <= wr_data;
    for (int i = 0; i < NUM_RD; i++) rd_data[i] <= mem[rd_addr[i]];
  end

endmodule
