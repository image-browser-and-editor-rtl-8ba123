// Colour look-up tables: turn an 8-bit (256-colour) pixel into 24-bit RGB.
//
// Each image slot owns three 256-entry tables, one per channel, written a
// byte at a time by the image decoder (channel 0 red, 1 green, 2 blue). Each
// of the NUM_RD read ports takes a slot and a colour index and returns the
// three table entries as one rgb_t one clock later. The three tables are separate
// arrays so that one write touches one channel while a read returns all
// three at once.
//
// The 8-bit to 24-bit conversion through per-image RGB tables follows the
// design description; the number of read ports, their layout and latency are this
// design's choices.
module color_lut
  import img_pkg::*;
#(
  parameter int unsigned NUM_IMAGES = 4,
  parameter int unsigned NUM_RD     = 4,
  localparam int unsigned SLOT_W    = (NUM_IMAGES > 1) ? $clog2(NUM_IMAGES) : 1,
  localparam int unsigned DEPTH     = NUM_IMAGES * 256
) (
  input  logic              clk,
  input  logic              we,
  input  logic [SLOT_W-1:0] wr_slot,
  input  logic [1:0]        wr_chan,
  input  logic [7:0]        wr_index,
  input  logic [7:0]        wr_data,
  input  logic [NUM_RD-1:0][SLOT_W-1:0] rd_slot,
  input  logic [NUM_RD-1:0][7:0]        rd_index,
  output rgb_t [NUM_RD-1:0]             rd_rgb
);

  logic [7:0] lut_r [DEPTH];
  logic [7:0] lut_g [DEPTH];
  logic [7:0] lut_b [DEPTH];

  logic [SLOT_W+7:0] wa;
  assign wa = {wr_slot, wr_index};

  always_ff @(posedge clk) begin
    if (we && wr_chan == 2'd0) lut_r[wa] <= wr_data;
    if (we && wr_chan == 2'd1) lut_g[wa] <= wr_data;
    if (we && wr_chan == 2'd2) lut_b[wa] <= wr_data;
    for (int i = 0; i < NUM_RD; i++) begin
      rd_rgb[i].r <= lut_r[{rd_slot[i], rd_index[i]}];
      rd_rgb[i].g <= lut_g[{rd_slot[i], rd_index[i]}];
      rd_rgb[i].b <= lut_b[{rd_slot[i], rd_index[i]}];
    end
  end

endmodule
