// End-to-end testbench of the image browser at a reduced size: four 32x16
// image slots, a 32x16 screen with short blanking (42x21 clocks per frame)
// and a 3-clock debounce.
//
// Images go in through the USB pins with the strobe handshake; buttons and
// switches are pressed through the debouncer; the result is read only at the
// VGA outputs. After each step the testbench waits until the state has
// settled, captures one whole frame from the VGA port and compares every
// pixel with a model of what the screen must show: the film strip at the
// reported scroll position, or the selected image under the reported scale
// and angle (pixels within 0.02 pixel of a source pixel edge are skipped),
// or, with the bilinear switch on, a real-valued interpolation of the four
// neighbouring source pixels (each channel within 3).
// It counts the mechanisms it has made happen (USB loading, slot
// wrap-around, reload, buffer swaps, scrolling, scroll clamping, entering and
// leaving transform, zoom, rotation, bilinear) and fails for any that never happened.
// One frame is also checked while scrolling, when each new frame differs
// from the last: it must be the frame drawn in the previous frame time.
module tb_image_browser_top;
  import img_pkg::*;
  localparam int N = 4, IW = 32, IH = 16, SW_ = 32, SH = 16;
  localparam int PITCH = 16, TH = 8, TY0 = 4, BORD = 2;

  logic clk = 0, rst = 1;
  logic [7:0] usb_data = 0;
  logic usb_strobe = 0;
  logic [NUM_BTN-1:0] btn = 0;
  logic [NUM_SW-1:0] sw = 0;
  rgb_t vga_rgb;
  logic vga_hsync, vga_vsync, vga_blank, frame_swap;
  mode_t mode;
  logic [1:0] sel_slot, load_slot;
  logic bilinear;
  logic [N-1:0] slot_loaded;
  logic [31:0] scroll_pos;
  logic signed [SCALE_W-1:0] scale;
  logic [ANGLE_W-1:0] angle;
  int checks = 0, failures = 0;

  image_browser_top #(
    .NUM_IMAGES(N), .IMG_W(IW), .IMG_H(IH),
    .H_ACTIVE(SW_), .H_FP(2), .H_SYNC(4), .H_BP(4),
    .V_ACTIVE(SH), .V_FP(1), .V_SYNC(2), .V_BP(2),
    .DEBOUNCE_CYCLES(3), .BROWSE_SHIFT(1), .BORDER(BORD),
    .SCROLL_STEP(4), .ANGLE_STEP(201)
  ) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  // ---------------------------------------------------------------- model
  logic [7:0] m_pix [N][IW * IH];
  logic [7:0] m_lut [N][3][256];
  int m_slot = 0;
  bit m_loaded [N] = '{default: 0};
  int n_swap = 0, n_bytes = 0, n_wrap = 0, n_reload = 0, n_scroll = 0, n_clamp = 0;
  int n_moving = 0, n_browse = 0, n_transform = 0, n_zoom = 0, n_rot = 0, n_back = 0, n_skip = 0;
  int n_bil = 0;

  always @(posedge clk) if (!rst && frame_swap) n_swap++;

  function automatic rgb_t lut_rgb(input int s, input int idx);
    return '{r: m_lut[s][0][idx], g: m_lut[s][1][idx], b: m_lut[s][2][idx]};
  endfunction

  function automatic rgb_t browse_px(input int scroll, input int x, input int y);
    int sx, ty, img, col;
    sx = scroll - SW_ / 2 + x;
    ty = y - TY0;
    if (sx < 0 || sx >= N * PITCH || ty < 0 || ty >= TH) return BACKGROUND;
    img = sx / PITCH; col = sx % PITCH;
    if (col < BORD || col >= PITCH - BORD || !m_loaded[img]) return BACKGROUND;
    return lut_rgb(img, int'(m_pix[img][ty * 2 * IW + col * 2]));
  endfunction

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
    else px = lut_rgb(sel, int'(m_pix[sel][fv * IW + fu]));
    return 1;
  endfunction

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
      else c = lut_rgb(sel, int'(m_pix[sel][ty * IW + tx]));
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

  // ---------------------------------------------------------------- drivers
  task automatic usb_byte(input logic [7:0] b);
    #2 usb_data = b;
    repeat (2) @(posedge clk);
    #3 usb_strobe = 1;
    repeat (4) @(posedge clk);
    #3 usb_strobe = 0;
    repeat (3) @(posedge clk);
    n_bytes++;
  endtask

  task automatic send_image(input int sd);
    for (int c = 0; c < 3; c++)
      for (int i = 0; i < 256; i++) begin
        logic [7:0] b;
        case (c)
          0: b = 8'(i * 3 + sd * 17);
          1: b = 8'(i ^ (sd * 29));
          default: b = 8'(255 - i + sd);
        endcase
        m_lut[m_slot][c][i] = b;
        usb_byte(b);
      end
    for (int k = 0; k < IW * IH; k++) begin
      logic [7:0] b;
      b = 8'(k * 13 + sd * 7 + (k >> 5));
      m_pix[m_slot][k] = b;
      usb_byte(b);
    end
    repeat (4) @(posedge clk);
    check(slot_loaded[m_slot] == 1, $sformatf("slot %0d loaded", m_slot));
    m_loaded[m_slot] = 1;
    m_slot = (m_slot + 1) % N;
    if (m_slot == 0) n_wrap++;
    check(int'(load_slot) == m_slot, "decoder moved to the next slot");
  endtask

  task automatic wait_swaps(input int k);
    repeat (k) @(posedge frame_swap);
  endtask

  task automatic press(input int b);
    // held and released for at least one whole frame each, longer than
    // the debounce time
    @(negedge clk); btn[b] = 1;
    wait_swaps(2);
    @(negedge clk); btn[b] = 0;
    wait_swaps(2);
  endtask

  // capture the frame scanned out after the next swap and compare
  task automatic check_frame(input string what);
    rgb_t got [SW_ * SH];
    int n, bad;
    bit tf, bl;
    int s_scroll, s_scale, s_angle, s_sel;
    wait_swaps(2);     // inputs idle: the frame now shown used the current state
    s_scroll = int'(scroll_pos); s_scale = int'(scale); s_angle = int'(angle);
    s_sel = int'(sel_slot); tf = (mode == MODE_TRANSFORM);
    bl = bilinear;
    @(posedge frame_swap);
    n = 0;
    while (n < SW_ * SH) begin
      @(posedge clk); #1;
      if (!vga_blank) begin got[n] = vga_rgb; n++; end
    end
    bad = 0;
    for (int y = 0; y < SH; y++)
      for (int x = 0; x < SW_; x++) begin
        rgb_t e;
        if (!tf) begin
          e = browse_px(s_scroll, x, y);
          check(got[y * SW_ + x] == e, $sformatf("%s browse (%0d,%0d) got %h exp %h", what, x, y, got[y * SW_ + x], e));
        end else if (bl) begin
          e = bilinear_px(s_scale, s_angle, s_sel, x, y);
          check(near(got[y * SW_ + x], e, 3), $sformatf("%s bilinear (%0d,%0d) got %h exp %h", what, x, y, got[y * SW_ + x], e));
        end else if (transform_px(s_scale, s_angle, s_sel, x, y, e)) begin
          check(got[y * SW_ + x] == e, $sformatf("%s transform (%0d,%0d) got %h exp %h", what, x, y, got[y * SW_ + x], e));
        end else n_skip++;
      end
    if (tf) n_transform++; else n_browse++;
    if (tf && bl) n_bil++;
  endtask

  // while scrolling: the frame shown after a swap must be the one drawn with
  // the scroll position of the swap before (double buffering)
  task automatic check_moving_frame(input string what);
    rgb_t got [SW_ * SH];
    int n, s_scroll;
    @(posedge frame_swap); #1;
    s_scroll = int'(scroll_pos);
    @(posedge frame_swap);
    n = 0;
    while (n < SW_ * SH) begin
      @(posedge clk); #1;
      if (!vga_blank) begin got[n] = vga_rgb; n++; end
    end
    for (int y = 0; y < SH; y++)
      for (int x = 0; x < SW_; x++)
        check(got[y * SW_ + x] == browse_px(s_scroll, x, y),
              $sformatf("%s scroll %0d (%0d,%0d)", what, s_scroll, x, y));
    n_moving++;
  endtask

  // ---------------------------------------------------------------- sequence
  initial begin
    int last;
    repeat (5) @(negedge clk); rst = 0;
    for (int i = 0; i < N; i++) send_image(i + 1);
    check(slot_loaded == 4'b1111, "all slots loaded");
    check_frame("start");
    check(scroll_pos == 32'(PITCH / 2), "starts centred on slot 0");
    // scroll right to centre slot 1
    @(negedge clk); btn[BTN_RIGHT] = 1;
    last = int'(scroll_pos);
    while (int'(scroll_pos) < PITCH + PITCH / 2) begin
      @(posedge frame_swap);
      if (int'(scroll_pos) != last) n_scroll++;
      last = int'(scroll_pos);
    end
    @(negedge clk); btn[BTN_RIGHT] = 0;
    check_frame("scrolled");
    // select slot 1
    press(BTN_SELECT);
    check(mode == MODE_TRANSFORM && sel_slot == 2'd1, "transform on slot 1");
    check_frame("identity");
    // zoom in by one octave (4 quarter steps)
    sw[SW_ROTATE] = 0;
    for (int i = 0; i < 4; i++) press(BTN_RIGHT);
    check(scale == 4, $sformatf("scale %0d", scale));
    if (scale == 4) n_zoom++;
    check_frame("zoom 2x");
    // rotate
    @(negedge clk); sw[SW_ROTATE] = 1;
    wait_swaps(2);
    @(negedge clk); btn[BTN_RIGHT] = 1;
    wait_swaps(6);
    @(negedge clk); btn[BTN_RIGHT] = 0;
    check(angle != 0 && int'(angle) % 201 == 0, $sformatf("angle %0d", angle));
    if (angle != 0) n_rot++;
    check_frame("rotated");
    // the same view with bilinear interpolation
    @(negedge clk); sw[SW_BILINEAR] = 1;
    wait_swaps(2);
    check(bilinear, "bilinear on");
    check_frame("rotated bilinear");
    @(negedge clk); sw[SW_BILINEAR] = 0;
    // back to browse, scroll to the left end and past it
    press(BTN_BACK);
    check(mode == MODE_BROWSE, "back to browse");
    if (mode == MODE_BROWSE) n_back++;
    @(negedge clk); btn[BTN_LEFT] = 1;
    check_moving_frame("scrolling left");
    while (int'(scroll_pos) > PITCH / 2) @(posedge frame_swap);
    wait_swaps(3);
    @(negedge clk); btn[BTN_LEFT] = 0;
    check(scroll_pos == 32'(PITCH / 2), "clamped at the left end");
    if (scroll_pos == 32'(PITCH / 2)) n_clamp++;
    check_frame("left end");
    // a fifth image wraps round to slot 0
    send_image(9);
    check_frame("slot 0 replaced");
    // reload restarts at slot 0
    press(BTN_RELOAD);
    m_slot = 0;
    check(load_slot == 0, "reload returns to slot 0");
    n_reload++;
    send_image(12);
    check_frame("after reload");

    $display("bytes %0d swaps %0d scroll %0d clamp %0d browse %0d transform %0d zoom %0d rot %0d bilinear %0d back %0d wrap %0d reload %0d skipped %0d",
             n_bytes, n_swap, n_scroll, n_clamp, n_browse, n_transform, n_zoom, n_rot, n_bil, n_back, n_wrap, n_reload, n_skip);
    check(n_bytes > 0, "USB bytes");
    check(n_swap > 0, "buffer swap");
    check(n_scroll > 0, "scroll");
    check(n_clamp > 0, "scroll clamp");
    check(n_browse > 0, "browse frame");
    check(n_moving > 0, "frame shown while scrolling");
    check(n_transform > 0, "transform frame");
    check(n_zoom > 0, "zoom");
    check(n_rot > 0, "rotation");
    check(n_bil > 0, "bilinear frame");
    check(n_back > 0, "transform to browse");
    check(n_wrap > 0, "slot wrap");
    check(n_reload > 0, "reload");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
