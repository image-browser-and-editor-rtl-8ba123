// Testbench for display_fsm on a 32x16 screen with four 32x16 image slots
// (slot 2 empty), thumbnails at half size, 2-pixel borders and a scroll
// step of 4. Behavioural image RAM and colour LUTs (contents given by simple
// formulas) and a real transformer surround the FSM; the testbench makes
// the vertical-blank pulses and drives the debounced buttons directly.
//
// Every frame it checks the buffer swap, the user-visible state against its
// own model of the controls (scroll with clamping, select of an empty slot
// ignored, select of a loaded one, scale steps, rotation with wrap-around,
// back to browse), and then compares the whole rendered back buffer with
// a model of the film strip or of the transformed image. Transform pixels
// whose source position lies within 0.02 pixel of a pixel edge are skipped,
// as rounding may legitimately fall either way there. Bilinear frames are
// compared with a real-valued interpolation of the four neighbouring source
// pixels, each channel within 3 of it (fixed-point coefficients, 8-bit
// fractions and rounding); browse frames must ignore the bilinear switch.
module tb_display_fsm;
  import img_pkg::*;
  localparam int SW_ = 32, SH = 16, N = 4, IW = 32, IH = 16;
  localparam int PITCH = 16, TH = 8, TY0 = 4, BORD = 2, STEP = 4, ASTEP = 201;
  localparam int FRAME = 700;
  localparam logic [N-1:0] LOADED = 4'b1011;

  logic clk = 0, rst = 1;
  logic [NUM_BTN-1:0] btn_level = 0, btn_pressed = 0;
  logic [NUM_SW-1:0] sw_level = 0;
  logic vblank_start = 0;
  logic [N-1:0] slot_loaded = LOADED;
  logic tr_start, tr_ready, tr_step, tr_in_image;
  logic signed [SCALE_W-1:0] tr_scale;
  logic [ANGLE_W-1:0] tr_angle;
  logic [4:0] tr_src_x;
  logic [3:0] tr_src_y;
  logic signed [35:0] tr_src_u, tr_src_v;
  logic [NUM_TAPS-1:0][10:0] pix_rd_addr;
  logic [NUM_TAPS-1:0][7:0] pix_rd_data, lut_rd_index;
  logic [NUM_TAPS-1:0][1:0] lut_rd_slot;
  logic [1:0] sel_slot;
  logic bilinear;
  rgb_t [NUM_TAPS-1:0] lut_rd_rgb;
  rgb_t fb_wr_data;
  logic [1:0] fb_we;
  logic [8:0] fb_wr_addr;
  logic front_sel, frame_swap;
  mode_t mode;
  logic [31:0] scroll_pos;
  int checks = 0, failures = 0;

  display_fsm #(.SCREEN_W(SW_), .SCREEN_H(SH), .NUM_IMAGES(N), .IMG_W(IW), .IMG_H(IH),
                .BROWSE_SHIFT(1), .BORDER(BORD), .SCROLL_STEP(STEP),
                .ANGLE_STEP(ASTEP)) dut (.*);

  transformer #(.OUT_W(SW_), .OUT_H(SH), .IMG_W(IW), .IMG_H(IH)) u_tr (
    .clk, .rst, .start (tr_start), .scale (tr_scale), .angle (tr_angle),
    .ready (tr_ready), .step (tr_step), .src_u (tr_src_u), .src_v (tr_src_v),
    .src_x (tr_src_x), .src_y (tr_src_y), .in_image (tr_in_image));

  always #5 clk = ~clk;

  // memory models
  function automatic logic [7:0] pix_of(input int addr);
    return 8'(addr * 37 + 11);
  endfunction
  function automatic rgb_t lut_of(input int slot, input int idx);
    return '{r: 8'(slot * 60 + idx), g: 8'(idx ^ 8'h5a), b: 8'(idx + slot)};
  endfunction
  always @(posedge clk) begin
    for (int t = 0; t < NUM_TAPS; t++) begin
      pix_rd_data[t] <= pix_of(int'(pix_rd_addr[t]));
      lut_rd_rgb[t]  <= lut_of(int'(lut_rd_slot[t]), int'(lut_rd_index[t]));
    end
  end

  // captured frame buffers
  rgb_t fbs [2][SW_ * SH];
  int wrong_buffer = 0, writes [2];
  int b_scroll_prev = PITCH / 2;
  always @(posedge clk) if (!rst) begin
    for (int b = 0; b < 2; b++) if (fb_we[b]) begin
      fbs[b][fb_wr_addr] <= fb_wr_data;
      writes[b]++;
      if (b == int'(front_sel)) wrong_buffer++;
    end
  end

  initial begin
    #5000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  // expected state
  int e_scroll = PITCH / 2, e_scale = 0, e_angle = 0, e_sel = 0;
  bit e_transform = 0, e_front = 0, e_rendered = 0;
  int n_swap = 0, n_browse = 0, n_transform = 0, n_clamp = 0, n_ignored = 0;
  int n_wrap = 0, n_skip = 0, n_scale = 0, n_rot = 0, n_back = 0, n_bil = 0;

  function automatic rgb_t browse_px(input int scroll, input int x, input int y);
    int sx, ty, img, col;
    sx = scroll - SW_ / 2 + x;
    ty = y - TY0;
    if (sx < 0 || sx >= N * PITCH || ty < 0 || ty >= TH) return BACKGROUND;
    img = sx / PITCH; col = sx % PITCH;
    if (col < BORD || col >= PITCH - BORD || !LOADED[img]) return BACKGROUND;
    return lut_of(img, int'(pix_of(img * IW * IH + ty * 2 * IW + col * 2)));
  endfunction

  // returns 0 when the pixel is too close to an edge to be decided
  function automatic bit transform_px(input int s, input int a, input int sel,
                                      input int x, input int y, output rgb_t px);
    real m, ca, sa, dx, dy, u, v;
    int fu, fv;
    m  = 2.0 ** (-real'(s) / 4.0);
    ca = m * $cos(real'(a) / 8192.0);
    sa = m * $sin(real'(a) / 8192.0);
    dx = real'(x) + 0.5 - SW_ / 2.0;
    dy = real'(y) + 0.5 - SH / 2.0;
    u  = IW / 2.0 + ca * dx + sa * dy;
    v  = IH / 2.0 - sa * dx + ca * dy;
    fu = $floor(u); fv = $floor(v);
    if (u - fu < 0.02 || u - fu > 0.98 || v - fv < 0.02 || v - fv > 0.98) return 0;
    if (fu < 0 || fu >= IW || fv < 0 || fv >= IH) px = BACKGROUND;
    else px = lut_of(sel, int'(pix_of(sel * IW * IH + fv * IW + fu)));
    return 1;
  endfunction

  // real-valued bilinear interpolation of the four source pixels around the
  // sample position; pixels outside the image count as background
  function automatic rgb_t bilinear_px(input int s, input int a, input int sel,
                                       input int x, input int y);
    real m, ca, sa, dx, dy, u, v, fx, fy, w, acc [3];
    int x0, y0, tx, ty;
    rgb_t c, px;
    m  = 2.0 ** (-real'(s) / 4.0);
    ca = m * $cos(real'(a) / 8192.0);
    sa = m * $sin(real'(a) / 8192.0);
    dx = real'(x) + 0.5 - SW_ / 2.0;
    dy = real'(y) + 0.5 - SH / 2.0;
    u  = IW / 2.0 + ca * dx + sa * dy - 0.5;
    v  = IH / 2.0 - sa * dx + ca * dy - 0.5;
    x0 = $floor(u); y0 = $floor(v);
    fx = u - x0; fy = v - y0;
    acc[0] = 0.0; acc[1] = 0.0; acc[2] = 0.0;
    for (int t = 0; t < 4; t++) begin
      tx = x0 + t % 2; ty = y0 + t / 2;
      w  = ((t % 2) ? fx : 1.0 - fx) * ((t / 2) ? fy : 1.0 - fy);
      if (tx < 0 || tx >= IW || ty < 0 || ty >= IH) c = BACKGROUND;
      else c = lut_of(sel, int'(pix_of(sel * IW * IH + ty * IW + tx)));
      acc[0] += w * c.r; acc[1] += w * c.g; acc[2] += w * c.b;
    end
    px.r = 8'($rtoi(acc[0] + 0.5));
    px.g = 8'($rtoi(acc[1] + 0.5));
    px.b = 8'($rtoi(acc[2] + 0.5));
    return px;
  endfunction

  function automatic bit near(input rgb_t a, input rgb_t b, input int tol);
    return (int'(a.r) - int'(b.r) <= tol) && (int'(b.r) - int'(a.r) <= tol) &&
           (int'(a.g) - int'(b.g) <= tol) && (int'(b.g) - int'(a.g) <= tol) &&
           (int'(a.b) - int'(b.b) <= tol) && (int'(b.b) - int'(a.b) <= tol);
  endfunction

  // one frame: inputs held during it, presses given one clock each
  task automatic frame(input logic [NUM_BTN-1:0] hold, input logic [NUM_BTN-1:0] press,
                       input bit rot_sw, input bit bil = 0);
    int b_scroll, b_scale, b_angle, b_sel;
    bit b_transform, b_buf;
    // presses during the previous frame's drawing time
    sw_level = '0;
    sw_level[SW_ROTATE]   = rot_sw;
    sw_level[SW_BILINEAR] = bil;
    for (int i = 0; i < NUM_BTN; i++) if (press[i]) begin
      @(negedge clk); btn_pressed = 0; btn_pressed[i] = 1;
      @(negedge clk); btn_pressed = 0;
    end
    btn_level = hold;
    // model the effect of this vblank
    if (e_rendered) begin e_front = !e_front; n_swap++; end
    if (!e_transform) begin
      if (hold[BTN_LEFT] && !hold[BTN_RIGHT]) begin
        if (e_scroll - STEP < PITCH / 2) begin e_scroll = PITCH / 2; n_clamp++; end
        else e_scroll -= STEP;
      end else if (hold[BTN_RIGHT] && !hold[BTN_LEFT]) begin
        if (e_scroll + STEP > N * PITCH - PITCH / 2) begin e_scroll = N * PITCH - PITCH / 2; n_clamp++; end
        else e_scroll += STEP;
      end
      if (press[BTN_SELECT]) begin
        // the selection uses the scroll position before this frame's move
        if (LOADED[b_scroll_prev / PITCH]) begin
          e_transform = 1; e_sel = b_scroll_prev / PITCH; e_scale = 0; e_angle = 0;
        end else n_ignored++;
      end
    end else begin
      if (press[BTN_BACK]) begin e_transform = 0; n_back++; end
      else if (!rot_sw) begin
        if (press[BTN_RIGHT] && !press[BTN_LEFT] && e_scale < 15) begin e_scale++; n_scale++; end
        else if (press[BTN_LEFT] && !press[BTN_RIGHT] && e_scale > -16) begin e_scale--; n_scale++; end
      end else begin
        if (hold[BTN_RIGHT] && !hold[BTN_LEFT]) begin
          e_angle += ASTEP; n_rot++;
          if (e_angle >= 51472) begin e_angle -= 51472; n_wrap++; end
        end else if (hold[BTN_LEFT] && !hold[BTN_RIGHT]) begin
          e_angle -= ASTEP; n_rot++;
          if (e_angle < 0) begin e_angle += 51472; n_wrap++; end
        end
      end
    end
    b_scroll_prev = e_scroll;
    // the vblank pulse
    @(negedge clk); vblank_start = 1;
    @(negedge clk); vblank_start = 0;
    check(front_sel == e_front, $sformatf("front buffer %0d", e_front));
    check(int'(scroll_pos) == e_scroll, $sformatf("scroll %0d exp %0d", scroll_pos, e_scroll));
    check((mode == MODE_TRANSFORM) == e_transform, "mode");
    check(bilinear == bil, "bilinear flag");
    if (e_transform) begin
      check(int'(sel_slot) == e_sel, "selected slot");
      check(int'(tr_scale) == e_scale, $sformatf("scale %0d exp %0d", tr_scale, e_scale));
      check(int'(tr_angle) == e_angle, $sformatf("angle %0d exp %0d", tr_angle, e_angle));
    end
    b_scroll = e_scroll; b_scale = e_scale; b_angle = e_angle; b_sel = e_sel;
    b_transform = e_transform; b_buf = !e_front;
    writes[b_buf] = 0;
    repeat (FRAME - 2 - 2 * $countones(press)) @(negedge clk);
    // the frame drawn into the back buffer must be complete and right
    check(writes[b_buf] == SW_ * SH, $sformatf("%0d writes", writes[b_buf]));
    for (int y = 0; y < SH; y++)
      for (int x = 0; x < SW_; x++) begin
        rgb_t e;
        if (!b_transform) begin
          e = browse_px(b_scroll, x, y);
          check(fbs[b_buf][y * SW_ + x] == e,
                $sformatf("browse s%0d (%0d,%0d) got %h exp %h", b_scroll, x, y, fbs[b_buf][y * SW_ + x], e));
        end else if (bil) begin
          e = bilinear_px(b_scale, b_angle, b_sel, x, y);
          check(near(fbs[b_buf][y * SW_ + x], e, 3),
                $sformatf("bilinear s%0d a%0d (%0d,%0d) got %h exp %h", b_scale, b_angle, x, y,
                          fbs[b_buf][y * SW_ + x], e));
        end else if (transform_px(b_scale, b_angle, b_sel, x, y, e)) begin
          check(fbs[b_buf][y * SW_ + x] == e,
                $sformatf("transform (%0d,%0d) got %h exp %h", x, y, fbs[b_buf][y * SW_ + x], e));
        end else n_skip++;
      end
    if (b_transform) n_transform++; else n_browse++;
    if (b_transform && bil) n_bil++;
    e_rendered = 1;
  endtask

  localparam logic [NUM_BTN-1:0] NONE = '0;
  localparam logic [NUM_BTN-1:0] L = 5'b00001, R = 5'b00010, SEL = 5'b00100, BK = 5'b01000;

  initial begin
    writes[0] = 0; writes[1] = 0;
    repeat (3) @(negedge clk); rst = 0;
    repeat (5) @(negedge clk);
    frame(NONE, NONE, 0);
    frame(NONE, NONE, 0);
    frame(L, NONE, 0);                              // clamp at the left end
    for (int i = 0; i < 9; i++) frame(R, NONE, 0);  // 8 -> 44
    frame(NONE, NONE, 0);
    frame(NONE, SEL, 0);                            // centre on slot 2: empty, ignored
    for (int i = 0; i < 6; i++) frame(R, NONE, 0);  // to 56 and clamp
    frame(NONE, NONE, 0);
    frame(NONE, SEL, 0);                            // select slot 3
    frame(NONE, NONE, 0);
    frame(NONE, NONE, 0, 1);                        // bilinear at unit scale
    frame(NONE, R, 0);                              // scale +1
    frame(NONE, R, 0);                              // scale +2
    frame(NONE, R, 0);
    frame(NONE, R, 0);                              // scale +4: 2x zoom
    frame(NONE, L, 0);                              // scale +3
    for (int i = 0; i < 3; i++) frame(R, NONE, 1);  // rotate
    for (int i = 0; i < 5; i++) frame(L, NONE, 1);  // rotate back through 0
    for (int i = 0; i < 3; i++) frame(R, NONE, 1, 1); // bilinear, magnified and rotated
    frame(NONE, L, 0);
    for (int i = 0; i < 8; i++) frame(NONE, L, 0);  // zoom out
    frame(NONE, NONE, 0, 1);                        // bilinear, reduced
    frame(NONE, BK, 0);                             // back to browse
    for (int i = 0; i < 3; i++) frame(L, NONE, 0);
    frame(NONE, NONE, 0, 1);                        // browse ignores the switch
    frame(NONE, SEL, 0);                            // slot 2 again? depends on scroll
    frame(NONE, NONE, 0);
    check(wrong_buffer == 0, "never writes the front buffer");
    check(n_swap > 0 && n_browse > 0 && n_transform > 0 && n_clamp >= 2 && n_ignored > 0 &&
          n_wrap > 0 && n_scale > 0 && n_rot > 0 && n_back > 0 && n_bil >= 5,
          "every mechanism exercised");
    $display("swaps %0d browse %0d transform %0d clamps %0d ignored %0d wraps %0d scale %0d rot %0d back %0d bilinear %0d skipped %0d",
             n_swap, n_browse, n_transform, n_clamp, n_ignored, n_wrap, n_scale, n_rot, n_back, n_bil, n_skip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
