// Image decoder: routes each incoming byte to the memory location it belongs
// to.
//
// An image arrives as four parts, matching the host's preprocessing output:
// the red, green and blue look-up tables (256 bytes each, entry 0 first)
// followed by the IMG_W*IMG_H pixel indices in raster order. The decoder
// counts bytes within the image; LUT bytes become writes to color_lut (slot,
// channel, entry), pixel bytes become writes to image_ram at
// slot*IMG_W*IMG_H + offset. After the last pixel the slot is marked loaded
// and the next byte starts the next slot, wrapping after NUM_IMAGES. While a
// slot is being overwritten its loaded flag is cleared. `restart` returns to
// the first byte of slot 0. Every write happens in the cycle after
// byte_valid.
//
// The four-part image and the slot count follow the design description;
// the order of the parts within the stream, the fixed image size per slot
// and the restart input are this design's choices.
module image_decoder #(
  parameter int unsigned NUM_IMAGES = 4,
  parameter int unsigned IMG_W      = 1024,
  parameter int unsigned IMG_H      = 768,
  localparam int unsigned IMG_PIX   = IMG_W * IMG_H,
  localparam int unsigned PIX_AW    = $clog2(NUM_IMAGES * IMG_PIX),
  localparam int unsigned SLOT_W    = (NUM_IMAGES > 1) ? $clog2(NUM_IMAGES) : 1,
  localparam int unsigned CNT_W     = $clog2(IMG_PIX + 768 + 1)
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  restart,
  input  logic [7:0]            byte_data,
  input  logic                  byte_valid,
  // pixel array writes
  output logic                  pix_we,
  output logic [PIX_AW-1:0]     pix_addr,
  output logic [7:0]            pix_data,
  // colour LUT writes
  output logic                  lut_we,
  output logic [SLOT_W-1:0]     lut_slot,
  output logic [1:0]            lut_chan,   // 0 red, 1 green, 2 blue
  output logic [7:0]            lut_index,
  output logic [7:0]            lut_data,
  // status
  output logic [NUM_IMAGES-1:0] slot_loaded,
  output logic [SLOT_W-1:0]     cur_slot
);

  localparam int unsigned LUT_BYTES = 768;
  localparam logic [CNT_W-1:0] LAST_BYTE = CNT_W'(LUT_BYTES + IMG_PIX - 1);

  logic [CNT_W-1:0]  count;      // byte position within the image
  logic [PIX_AW-1:0] slot_base;  // cur_slot * IMG_PIX

  always_ff @(posedge clk) begin
    if (rst || restart) begin
      count       <= '0;
      cur_slot    <= '0;
      slot_base   <= '0;
      pix_we      <= 1'b0;
      lut_we      <= 1'b0;
      pix_addr    <= '0;
      pix_data    <= '0;
      lut_slot    <= '0;
      lut_chan    <= '0;
      lut_index   <= '0;
      lut_data    <= '0;
      if (rst) slot_loaded <= '0;
    end else begin
      pix_we <= 1'b0;
      lut_we <= 1'b0;
      if (byte_valid) begin
        if (count < CNT_W'(LUT_BYTES)) begin
          lut_we    <= 1'b1;
          lut_slot  <= cur_slot;
          lut_chan  <= 2'(count >> 8);
          lut_index <= count[7:0];
          lut_data  <= byte_data;
          if (count == '0) slot_loaded[cur_slot] <= 1'b0;
        end else begin
          pix_we   <= 1'b1;
          pix_addr <= slot_base + PIX_AW'(count - CNT_W'(LUT_BYTES));
          pix_data <= byte_data;
        end
        if (count == LAST_BYTE) begin
          count                 <= '0;
          slot_loaded[cur_slot] <= 1'b1;
          if (cur_slot == SLOT_W'(NUM_IMAGES - 1)) begin
            cur_slot  <= '0;
            slot_base <= '0;
          end else begin
            cur_slot  <= cur_slot + 1'b1;
            slot_base <= slot_base + PIX_AW'(IMG_PIX);
          end
        end else begin
          count <= count + 1'b1;
        end
      end
    end
  end

endmodule
