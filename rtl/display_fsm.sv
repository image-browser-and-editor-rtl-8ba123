// Display FSM: the central controller, in one of two states, browse or
// transform, that builds every new frame one pixel per clock.
//
// Frame loop. The FSM owns two frame buffers: the front one is scanned out,
// the back one is drawn. At each vblank_start from the timing generator, if
// the back frame is complete the buffers swap (front_sel toggles), button
// events gathered since the last frame are applied, and drawing of the next
// frame begins. Drawing walks the SCREEN_W x SCREEN_H raster once, one
// pixel per clock (786,432 clocks at the defaults, inside the 1,083,264
// clocks of a 60 Hz frame at 65 MHz).
//
// Pixel pipeline, three clocks deep: (0) the raster position is mapped to
// up to four source taps (slot, row, column, valid) and two 8-bit
// fractions, which address the four image RAM read ports; (1) the 8-bit
// colour indices return and address the colour LUT of that slot; (2) the
// 24-bit colours return, bilinear_blend weights them, and the result is
// written to the back buffer (the background colour where no tap is valid).
// Browse and nearest-pixel drawing use tap 0 alone with zero fractions.
//
// Browse: the loaded images form a horizontal film strip of thumbnails,
// each subsampled by 2^BROWSE_SHIFT and PITCH pixels wide with a
// BORDER-pixel dark margin on each side, centred vertically. scroll_pos is
// the strip coordinate at the screen's centre; holding left/right moves it
// by SCROLL_STEP per frame, so images enter on one side, cross the screen
// and leave on the other. Select enters transform with the image under the
// screen centre, if that slot is loaded.
// Transform: only the selected image is drawn, at full size through the
// transformer. With the rotate switch off, left/right presses step the
// scale by one quarter octave; with it on, holding left/right turns the
// angle by ANGLE_STEP per frame. Back returns to browse. The bilinear
// switch selects, per frame, between the nearest source pixel and bilinear
// interpolation of the 2x2 source pixels around the sample position, whose
// centres are at integer + 0.5.
//
// The two states, the input sources, one pixel per clock into the current
// frame buffer, double buffering and the nearest-pixel and bilinear
// algorithms follow the design description. The
// film-strip geometry, the button assignment, the step sizes, swapping at
// vertical blank, the pipeline, the switch that chooses bilinear drawing,
// its 8-bit fractions and black for taps outside the image are this
// design's choices.
module display_fsm
  import img_pkg::*;
#(
  parameter int unsigned SCREEN_W     = 1024,
  parameter int unsigned SCREEN_H     = 768,
  parameter int unsigned NUM_IMAGES   = 4,
  parameter int unsigned IMG_W        = 1024,
  parameter int unsigned IMG_H        = 768,
  parameter int unsigned BROWSE_SHIFT = 1,
  parameter int unsigned BORDER       = 8,
  parameter int unsigned SCROLL_STEP  = 8,
  parameter int unsigned ANGLE_STEP   = 201,  // ~0.0245 rad in Q3.13
  localparam int unsigned IMG_PIX     = IMG_W * IMG_H,
  localparam int unsigned PIX_AW      = $clog2(NUM_IMAGES * IMG_PIX),
  localparam int unsigned FB_AW       = $clog2(SCREEN_W * SCREEN_H),
  localparam int unsigned SLOT_W      = (NUM_IMAGES > 1) ? $clog2(NUM_IMAGES) : 1,
  localparam int unsigned XW          = $clog2(IMG_W),
  localparam int unsigned YW          = $clog2(IMG_H),
  localparam int unsigned SXW         = $clog2(SCREEN_W),
  localparam int unsigned SYW         = $clog2(SCREEN_H)
) (
  input  logic                      clk,
  input  logic                      rst,
  // labkit inputs (debounced)
  input  logic [NUM_BTN-1:0]        btn_level,
  input  logic [NUM_BTN-1:0]        btn_pressed,
  input  logic [NUM_SW-1:0]         sw_level,
  // timing
  input  logic                      vblank_start,
  // image store status
  input  logic [NUM_IMAGES-1:0]     slot_loaded,
  // transformer
  output logic                      tr_start,
  output logic signed [SCALE_W-1:0] tr_scale,
  output logic [ANGLE_W-1:0]        tr_angle,
  input  logic                      tr_ready,
  output logic                      tr_step,
  input  logic [XW-1:0]             tr_src_x,
  input  logic [YW-1:0]             tr_src_y,
  input  logic                      tr_in_image,
  input  logic signed [35:0]        tr_src_u,
  input  logic signed [35:0]        tr_src_v,
  // image RAM read ports (data one clock after address)
  output logic [NUM_TAPS-1:0][PIX_AW-1:0] pix_rd_addr,
  input  logic [NUM_TAPS-1:0][7:0]        pix_rd_data,
  // colour LUT read ports (data one clock after address)
  output logic [NUM_TAPS-1:0][SLOT_W-1:0] lut_rd_slot,
  output logic [NUM_TAPS-1:0][7:0]        lut_rd_index,
  input  rgb_t [NUM_TAPS-1:0]             lut_rd_rgb,
  // back frame buffer write port
  output logic [1:0]                fb_we,
  output logic [FB_AW-1:0]          fb_wr_addr,
  output rgb_t                      fb_wr_data,
  output logic                      front_sel,
  // status
  output mode_t                     mode,
  output logic [SLOT_W-1:0]         sel_slot,
  output logic                      bilinear,
  output logic [31:0]               scroll_pos,
  output logic                      frame_swap   // pulses when buffers swap
);

  localparam int PITCH    = int'(IMG_W >> BROWSE_SHIFT);
  localparam int THUMB_H  = int'(IMG_H >> BROWSE_SHIFT);
  localparam int THUMB_Y0 = (int'(SCREEN_H) - THUMB_H) / 2;
  localparam int STRIP_W  = PITCH * int'(NUM_IMAGES);
  localparam int SCROLL_MIN = PITCH / 2;
  localparam int SCROLL_MAX = STRIP_W - PITCH / 2;
  localparam int MAX_SCALE  = (1 << (SCALE_W - 1)) - 1;
  localparam int MIN_SCALE  = -(1 << (SCALE_W - 1));

  typedef enum logic [1:0] {R_WAIT, R_SETUP, R_RUN, R_DRAIN} rstate_t;
  rstate_t rstate;

  logic [NUM_BTN-1:0] press_acc;   // presses since the last frame start
  logic               rendered;    // back buffer holds a complete frame
  logic [SXW-1:0]     rx;
  logic [SYW-1:0]     ry;
  logic [FB_AW-1:0]   raddr;
  logic               last_pix;

  // pipeline stages 1 and 2
  logic                s1_live;
  logic [NUM_TAPS-1:0] s1_valid;
  logic [SLOT_W-1:0]   s1_slot;
  logic [FB_AW-1:0]    s1_addr;
  logic [7:0]          s1_fx, s1_fy;
  logic                s2_busy;
  logic [NUM_TAPS-1:0] s2_valid;
  logic [FB_AW-1:0]    s2_addr;
  logic [7:0]          s2_fx, s2_fy;

  assign last_pix = (rx == SXW'(SCREEN_W - 1)) && (ry == SYW'(SCREEN_H - 1));

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk) begin
    if (rst) begin
      rstate     <= R_WAIT;
      press_acc  <= '0;
      rendered   <= 1'b0;
      front_sel  <= 1'b0;
      frame_swap <= 1'b0;
      mode       <= MODE_BROWSE;
      sel_slot   <= '0;
      bilinear   <= 1'b0;
      scroll_pos <= 32'(SCROLL_MIN);
      tr_scale   <= '0;
      tr_angle   <= '0;
      tr_start   <= 1'b0;
      rx         <= '0;
      ry         <= '0;
      raddr      <= '0;
    end else begin
      tr_start   <= 1'b0;
      frame_swap <= 1'b0;
      press_acc  <= press_acc | btn_pressed;
      case (rstate)
        R_WAIT: if (vblank_start) begin
          if (rendered) begin
            front_sel  <= ~front_sel;
            frame_swap <= 1'b1;
          end
          rendered  <= 1'b0;
          press_acc <= btn_pressed;
          bilinear  <= sw_level[SW_BILINEAR];
          // apply the user's input for the frame about to be drawn
          if (mode == MODE_BROWSE) begin
            if (btn_level[BTN_LEFT] && !btn_level[BTN_RIGHT])
              scroll_pos <= (int'(scroll_pos) - int'(SCROLL_STEP) < SCROLL_MIN)
                            ? 32'(SCROLL_MIN) : scroll_pos - SCROLL_STEP;
            else if (btn_level[BTN_RIGHT] && !btn_level[BTN_LEFT])
              scroll_pos <= (int'(scroll_pos) + int'(SCROLL_STEP) > SCROLL_MAX)
                            ? 32'(SCROLL_MAX) : scroll_pos + SCROLL_STEP;
            if (press_acc[BTN_SELECT] &&
                slot_loaded[SLOT_W'(int'(scroll_pos) / PITCH)]) begin
              mode     <= MODE_TRANSFORM;
              sel_slot <= SLOT_W'(int'(scroll_pos) / PITCH);
              tr_scale <= '0;
              tr_angle <= '0;
            end
          end else begin
            if (press_acc[BTN_BACK]) begin
              mode <= MODE_BROWSE;
            end else if (!sw_level[SW_ROTATE]) begin
              if (press_acc[BTN_RIGHT] && !press_acc[BTN_LEFT] &&
                  int'(tr_scale) < MAX_SCALE)
                tr_scale <= tr_scale + 1'b1;
              else if (press_acc[BTN_LEFT] && !press_acc[BTN_RIGHT] &&
                       int'(tr_scale) > MIN_SCALE)
                tr_scale <= tr_scale - 1'b1;
            end else begin
              if (btn_level[BTN_RIGHT] && !btn_level[BTN_LEFT])
                tr_angle <= (tr_angle + ANGLE_W'(ANGLE_STEP) >= ANGLE_2PI)
                            ? tr_angle + ANGLE_W'(ANGLE_STEP) - ANGLE_2PI
                            : tr_angle + ANGLE_W'(ANGLE_STEP);
              else if (btn_level[BTN_LEFT] && !btn_level[BTN_RIGHT])
                tr_angle <= (tr_angle < ANGLE_W'(ANGLE_STEP))
                            ? tr_angle + ANGLE_2PI - ANGLE_W'(ANGLE_STEP)
                            : tr_angle - ANGLE_W'(ANGLE_STEP);
            end
          end
          rstate <= R_SETUP;
          tr_start <= 1'b1;   // transformer picks up the updated parameters
        end
        R_SETUP: begin
          // tr_start was issued one clock ago with the new parameters
          rx    <= '0;
          ry    <= '0;
          raddr <= '0;
          if (mode == MODE_BROWSE || (tr_ready && !tr_start)) rstate <= R_RUN;
        end
        R_RUN: begin
          raddr <= raddr + 1'b1;
          if (rx == SXW'(SCREEN_W - 1)) begin
            rx <= '0;
            ry <= ry + 1'b1;
          end else begin
            rx <= rx + 1'b1;
          end
          if (last_pix) rstate <= R_DRAIN;
        end
        default: begin  // R_DRAIN: wait for the last pixels to be written
          if (!s1_live && !s2_busy) begin
            rendered <= 1'b1;
            rstate   <= R_WAIT;
          end
        end
      endcase
    end
  end

  assign tr_step = (rstate == R_RUN) && (mode == MODE_TRANSFORM);

  // ------------------------------------------------- stage 0: source mapping
  logic [NUM_TAPS-1:0] s0_valid;
  logic [SLOT_W-1:0]   s0_slot;
  logic [YW-1:0]       s0_row [NUM_TAPS];
  logic [XW-1:0]       s0_col [NUM_TAPS];
  logic [7:0]          s0_fx, s0_fy;

  // bilinear sample position relative to pixel centres
  logic signed [35:0]  bu, bv;
  logic signed [19:0]  bx0, by0;
  assign bu  = tr_src_u - 36'sd32768;
  assign bv  = tr_src_v - 36'sd32768;
  assign bx0 = bu[35:16];
  assign by0 = bv[35:16];

  always_comb begin
    int sx, ty, img, col, tx, ty2;
    tx  = 0;
    ty2 = 0;
    sx  = int'(scroll_pos) - int'(SCREEN_W / 2) + int'(rx);
    ty  = int'(ry) - THUMB_Y0;
    img = (sx >= 0) ? sx / PITCH : 0;
    col = (sx >= 0) ? sx % PITCH : 0;
    s0_valid = '0;
    s0_slot  = '0;
    s0_fx    = '0;
    s0_fy    = '0;
    for (int t = 0; t < NUM_TAPS; t++) begin
      s0_row[t] = '0;
      s0_col[t] = '0;
    end
    if (mode == MODE_BROWSE) begin
      s0_slot   = SLOT_W'(img);
      s0_row[0] = YW'(ty << BROWSE_SHIFT);
      s0_col[0] = XW'(col << BROWSE_SHIFT);
      s0_valid[0] = (sx >= 0) && (sx < STRIP_W) && (ty >= 0) && (ty < THUMB_H) &&
                    (col >= int'(BORDER)) && (col < PITCH - int'(BORDER)) &&
                    slot_loaded[SLOT_W'(img)];
    end else if (!bilinear) begin
      s0_slot     = sel_slot;
      s0_row[0]   = tr_src_y;
      s0_col[0]   = tr_src_x;
      s0_valid[0] = tr_in_image;
    end else begin
      // taps 0..3: (x0,y0) (x0+1,y0) (x0,y0+1) (x0+1,y0+1)
      s0_slot = sel_slot;
      s0_fx   = bu[15:8];
      s0_fy   = bv[15:8];
      for (int t = 0; t < NUM_TAPS; t++) begin
        tx  = int'(bx0) + (t % 2);
        ty2 = int'(by0) + (t / 2);
        s0_col[t]   = XW'(tx);
        s0_row[t]   = YW'(ty2);
        s0_valid[t] = (tx >= 0) && (tx < int'(IMG_W)) && (ty2 >= 0) && (ty2 < int'(IMG_H));
      end
    end
  end

  // ------------------------------------------------ stages 1 and 2: fetches

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_live  <= 1'b0;
      s1_valid <= '0;
      s1_slot  <= '0;
      s1_addr  <= '0;
      s1_fx    <= '0;
      s1_fy    <= '0;
      s2_busy  <= 1'b0;
      s2_valid <= '0;
      s2_addr  <= '0;
      s2_fx    <= '0;
      s2_fy    <= '0;
    end else begin
      // stage 0 -> 1
      s1_live  <= (rstate == R_RUN);
      s1_valid <= (rstate == R_RUN) ? s0_valid : '0;
      s1_slot  <= s0_slot;
      s1_addr  <= raddr;
      s1_fx    <= s0_fx;
      s1_fy    <= s0_fy;
      // stage 1 -> 2
      s2_busy  <= s1_live;
      s2_valid <= s1_valid;
      s2_addr  <= s1_addr;
      s2_fx    <= s1_fx;
      s2_fy    <= s1_fy;
    end
  end

  // the memories register these addresses, so their data lines up with the
  // next stage's registers
  always_comb begin
    for (int t = 0; t < NUM_TAPS; t++) begin
      pix_rd_addr[t]  = PIX_AW'(s0_slot) * PIX_AW'(IMG_PIX) +
                        PIX_AW'(s0_row[t]) * PIX_AW'(IMG_W) + PIX_AW'(s0_col[t]);
      lut_rd_slot[t]  = s1_slot;
      lut_rd_index[t] = pix_rd_data[t];
    end
  end

  // stage 2: blend and write the back buffer (the one not being shown)
  rgb_t blended;
  bilinear_blend u_blend (
    .tap       (lut_rd_rgb),
    .tap_valid (s2_valid),
    .fx        (s2_fx),
    .fy        (s2_fy),
    .out       (blended)
  );

  always_comb begin
    fb_we      = '0;
    fb_wr_addr = s2_addr;
    fb_wr_data = blended;
    if (s2_busy) fb_we[~front_sel] = 1'b1;
  end

endmodule
