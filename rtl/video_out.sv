// Video output stage: the multiplexer between the two frame buffers and the
// monitor.
//
// In the cycle the timing generator presents pixel (hcount, vcount), this
// block drives the shared frame-buffer read address vcount*WIDTH + hcount.
// One clock later both buffers return their word; the one selected by the
// display FSM's front_sel (delayed by the same clock, so a swap can never
// split a read) is registered onto vga_rgb, forced to black while blanking.
// Syncs and blank are delayed by the same two clocks, so the output pixel and
// the syncs stay aligned.
//
// The multiplexer selected by the display FSM follows the block diagram;
// the two-stage alignment and black blanking are this design's choices.
module video_out
  import img_pkg::*;
#(
  parameter int unsigned WIDTH  = 1024,
  parameter int unsigned HEIGHT = 768,
  parameter int unsigned HW     = 11,
  parameter int unsigned VW     = 10,
  localparam int unsigned AW    = $clog2(WIDTH * HEIGHT)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [HW-1:0] hcount,
  input  logic [VW-1:0] vcount,
  input  logic          hsync,
  input  logic          vsync,
  input  logic          blank,
  input  logic          front_sel,
  output logic [AW-1:0] fb_rd_addr,
  input  rgb_t          fb0_rd_data,
  input  rgb_t          fb1_rd_data,
  output rgb_t          vga_rgb,
  output logic          vga_hsync,
  output logic          vga_vsync,
  output logic          vga_blank
);

  logic hs_d, vs_d, bl_d, sel_d;

  always_comb begin
    fb_rd_addr = '0;
    if (!blank) fb_rd_addr = AW'(vcount) * AW'(WIDTH) + AW'(hcount);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hs_d      <= 1'b1;
      vs_d      <= 1'b1;
      bl_d      <= 1'b1;
      sel_d     <= 1'b0;
      vga_hsync <= 1'b1;
      vga_vsync <= 1'b1;
      vga_blank <= 1'b1;
      vga_rgb   <= BACKGROUND;
    end else begin
      hs_d      <= hsync;
      vs_d      <= vsync;
      bl_d      <= blank;
      sel_d     <= front_sel;
      vga_hsync <= hs_d;
      vga_vsync <= vs_d;
      vga_blank <= bl_d;
      if (bl_d)       vga_rgb <= BACKGROUND;
      else if (sel_d) vga_rgb <= fb1_rd_data;
      else            vga_rgb <= fb0_rd_data;
    end
  end

endmodule
