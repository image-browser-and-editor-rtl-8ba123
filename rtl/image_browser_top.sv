// Image browser and editor: top level.
//
// Images prepared on a host computer (256-colour pixels plus red, green and
// blue look-up tables) arrive byte by byte from a USB adapter. The USB
// reader synchronises them, the image decoder places each byte in the image
// RAM (pixels) or the colour LUTs, and marks a slot loaded when its image is
// complete. The display FSM, driven by the labkit buttons and switches,
// draws each frame into the back one of two frame buffers: a scrolling
// film strip of the loaded images (browse) or the selected image scaled and
// rotated by the transformer (transform), either with the nearest source
// pixel or with bilinear interpolation of four. The XVGA timing generator paces
// everything and scans the front buffer out through the output multiplexer
// to the monitor at 1024x768, 60 Hz, one pixel per 65 MHz clock.
//
// Interface: one clock (the 65 MHz pixel clock) and a synchronous,
// active-high reset; the USB adapter's data pins and strobe; active-high
// buttons (see img_pkg for their order) and switches; 24-bit RGB with
// active-low syncs and blank towards the monitor; and a few status outputs
// for the labkit's hex display. Video output lags the timing counters by
// two clocks.
//
// The block structure follows the design's block diagram. All modules run
// in the one pixel-clock domain, which is this design's choice.
module image_browser_top
  import img_pkg::*;
#(
  parameter int unsigned NUM_IMAGES      = 4,
  parameter int unsigned IMG_W           = 1024,
  parameter int unsigned IMG_H           = 768,
  parameter int unsigned H_ACTIVE        = 1024,
  parameter int unsigned H_FP            = 24,
  parameter int unsigned H_SYNC          = 136,
  parameter int unsigned H_BP            = 160,
  parameter int unsigned V_ACTIVE        = 768,
  parameter int unsigned V_FP            = 3,
  parameter int unsigned V_SYNC          = 6,
  parameter int unsigned V_BP            = 29,
  parameter int unsigned DEBOUNCE_CYCLES = 650_000,
  parameter int unsigned BROWSE_SHIFT    = 1,
  parameter int unsigned BORDER          = 8,
  parameter int unsigned SCROLL_STEP     = 8,
  parameter int unsigned ANGLE_STEP      = 201,
  localparam int unsigned SLOT_W         = (NUM_IMAGES > 1) ? $clog2(NUM_IMAGES) : 1
) (
  input  logic                  clk,
  input  logic                  rst,
  // USB adapter
  input  logic [7:0]            usb_data,
  input  logic                  usb_strobe,
  // labkit controls
  input  logic [NUM_BTN-1:0]    btn,
  input  logic [NUM_SW-1:0]     sw,
  // monitor
  output rgb_t                  vga_rgb,
  output logic                  vga_hsync,
  output logic                  vga_vsync,
  output logic                  vga_blank,
  // status
  output mode_t                 mode,
  output logic [SLOT_W-1:0]     sel_slot,
  output logic                  bilinear,
  output logic [NUM_IMAGES-1:0] slot_loaded,
  output logic [SLOT_W-1:0]     load_slot,
  output logic [31:0]           scroll_pos,
  output logic signed [SCALE_W-1:0] scale,
  output logic [ANGLE_W-1:0]    angle,
  output logic                  frame_swap
);

  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;
  localparam int unsigned HW      = $clog2(H_TOTAL);
  localparam int unsigned VW      = $clog2(V_TOTAL);
  localparam int unsigned PIX_AW  = $clog2(NUM_IMAGES * IMG_W * IMG_H);
  localparam int unsigned FB_AW   = $clog2(H_ACTIVE * V_ACTIVE);
  localparam int unsigned XW      = $clog2(IMG_W);
  localparam int unsigned YW      = $clog2(IMG_H);

  // ---- USB path
  logic [7:0]        rx_byte;
  logic              rx_valid;
  logic              pix_we, lut_we;
  logic [PIX_AW-1:0] pix_wr_addr;
  logic [7:0]        pix_wr_data;
  logic [SLOT_W-1:0] lut_wr_slot;
  logic [1:0]        lut_wr_chan;
  logic [7:0]        lut_wr_index, lut_wr_data;
  logic [NUM_TAPS-1:0][PIX_AW-1:0] pix_rd_addr;
  logic [NUM_TAPS-1:0][7:0]        pix_rd_data;
  logic [NUM_TAPS-1:0][SLOT_W-1:0] lut_rd_slot;
  logic [NUM_TAPS-1:0][7:0]        lut_rd_index;
  rgb_t [NUM_TAPS-1:0]             lut_rd_rgb;

  // ---- controls
  logic [NUM_BTN-1:0] btn_level, btn_pressed;
  logic [NUM_SW-1:0]  sw_level;

  // ---- timing and video
  logic [HW-1:0]     hcount;
  logic [VW-1:0]     vcount;
  logic              hsync, vsync, blank, vblank_start;
  logic [1:0]        fb_we;
  logic [FB_AW-1:0]  fb_wr_addr, fb_rd_addr;
  rgb_t              fb_wr_data, fb0_rd_data, fb1_rd_data;
  logic              front_sel;

  // ---- transformer
  logic                      tr_start, tr_ready, tr_step, tr_in_image;
  logic signed [SCALE_W-1:0] tr_scale;
  logic [ANGLE_W-1:0]        tr_angle;

  assign scale = tr_scale;
  assign angle = tr_angle;
  logic [XW-1:0]             tr_src_x;
  logic [YW-1:0]             tr_src_y;
  logic signed [35:0]        tr_src_u, tr_src_v;

  usb_reader u_usb (
    .clk, .rst,
    .usb_data, .usb_strobe,
    .byte_data (rx_byte), .byte_valid (rx_valid)
  );

  image_decoder #(.NUM_IMAGES(NUM_IMAGES), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_dec (
    .clk, .rst,
    .restart    (btn_pressed[BTN_RELOAD]),
    .byte_data  (rx_byte),
    .byte_valid (rx_valid),
    .pix_we, .pix_addr (pix_wr_addr), .pix_data (pix_wr_data),
    .lut_we, .lut_slot (lut_wr_slot), .lut_chan (lut_wr_chan),
    .lut_index (lut_wr_index), .lut_data (lut_wr_data),
    .slot_loaded, .cur_slot (load_slot)
  );

  image_ram #(.NUM_IMAGES(NUM_IMAGES), .IMG_W(IMG_W), .IMG_H(IMG_H), .NUM_RD(NUM_TAPS)) u_ram (
    .clk, .we (pix_we), .wr_addr (pix_wr_addr), .wr_data (pix_wr_data),
    .rd_addr (pix_rd_addr), .rd_data (pix_rd_data)
  );

  color_lut #(.NUM_IMAGES(NUM_IMAGES), .NUM_RD(NUM_TAPS)) u_lut (
    .clk, .we (lut_we), .wr_slot (lut_wr_slot), .wr_chan (lut_wr_chan),
    .wr_index (lut_wr_index), .wr_data (lut_wr_data),
    .rd_slot (lut_rd_slot), .rd_index (lut_rd_index), .rd_rgb (lut_rd_rgb)
  );

  user_input #(.NUM_BTN(NUM_BTN), .NUM_SW(NUM_SW),
               .DEBOUNCE_CYCLES(DEBOUNCE_CYCLES)) u_in (
    .clk, .rst, .btn_in (btn), .sw_in (sw),
    .btn_level, .btn_pressed, .sw_level
  );

  xvga #(.H_ACTIVE(H_ACTIVE), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
         .V_ACTIVE(V_ACTIVE), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP)) u_xvga (
    .clk, .rst, .hcount, .vcount, .hsync, .vsync, .blank, .vblank_start
  );

  transformer #(.OUT_W(H_ACTIVE), .OUT_H(V_ACTIVE),
                .IMG_W(IMG_W), .IMG_H(IMG_H)) u_tr (
    .clk, .rst,
    .start (tr_start), .scale (tr_scale), .angle (tr_angle),
    .ready (tr_ready), .step (tr_step),
    .src_u (tr_src_u), .src_v (tr_src_v),
    .src_x (tr_src_x), .src_y (tr_src_y), .in_image (tr_in_image)
  );

  display_fsm #(
    .SCREEN_W(H_ACTIVE), .SCREEN_H(V_ACTIVE), .NUM_IMAGES(NUM_IMAGES),
    .IMG_W(IMG_W), .IMG_H(IMG_H), .BROWSE_SHIFT(BROWSE_SHIFT),
    .BORDER(BORDER), .SCROLL_STEP(SCROLL_STEP), .ANGLE_STEP(ANGLE_STEP)
  ) u_fsm (
    .clk, .rst,
    .btn_level, .btn_pressed, .sw_level,
    .vblank_start, .slot_loaded,
    .tr_start, .tr_scale, .tr_angle, .tr_ready, .tr_step,
    .tr_src_x, .tr_src_y, .tr_in_image, .tr_src_u, .tr_src_v,
    .pix_rd_addr, .pix_rd_data,
    .lut_rd_slot, .lut_rd_index, .lut_rd_rgb,
    .fb_we, .fb_wr_addr, .fb_wr_data, .front_sel,
    .mode, .sel_slot, .bilinear, .scroll_pos, .frame_swap
  );

  frame_buffer #(.WIDTH(H_ACTIVE), .HEIGHT(V_ACTIVE)) u_fb0 (
    .clk, .we (fb_we[0]), .wr_addr (fb_wr_addr), .wr_data (fb_wr_data),
    .rd_addr (fb_rd_addr), .rd_data (fb0_rd_data)
  );

  frame_buffer #(.WIDTH(H_ACTIVE), .HEIGHT(V_ACTIVE)) u_fb1 (
    .clk, .we (fb_we[1]), .wr_addr (fb_wr_addr), .wr_data (fb_wr_data),
    .rd_addr (fb_rd_addr), .rd_data (fb1_rd_data)
  );

  video_out #(.WIDTH(H_ACTIVE), .HEIGHT(V_ACTIVE), .HW(HW), .VW(VW)) u_vout (
    .clk, .rst,
    .hcount, .vcount, .hsync, .vsync, .blank, .front_sel,
    .fb_rd_addr, .fb0_rd_data, .fb1_rd_data,
    .vga_rgb, .vga_hsync, .vga_vsync, .vga_blank
  );

endmodule
