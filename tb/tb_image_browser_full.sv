// Full-size testbench of the image browser: every parameter at its default
// (four 1024x768 slots, 1024x768 at 60 Hz timing, 10 ms debounce).
//
// One complete operation: a 1024x768 image with its three colour tables is
// sent through the USB pins (787,200 bytes), the film-strip frame that
// follows is captured at the VGA port and compared pixel by pixel with a
// model, the select button is pressed through the full debouncer, and the
// transform frame of the selected image (identity scale and angle) is
// captured and compared in the same way. About 13 million clocks.
module tb_image_browser_full;
  import img_pkg::*;
  localparam int N = 4, IW = 1024, IH = 768, SW_ = 1024, SH = 768;
  localparam int PITCH = 512, TH = 384, TY0 = 192, BORD = 8;

  logic clk = 0, rst = 1;
  logic [7:0] usb_data = 0;
  logic usb_strobe = 0;
  logic [NUM_BTN-1:0] btn = 0;
  logic [NUM_SW-1:0] sw = 0;
  rgb_t vga_rgb;
  logic vga_hsync, vga_vsync, vga_blank, frame_swap, bilinear;
  mode_t mode;
  logic [1:0] sel_slot, load_slot;
  logic [N-1:0] slot_loaded;
  logic [31:0] scroll_pos;
  logic signed [SCALE_W-1:0] scale;
  logic [ANGLE_W-1:0] angle;
  int checks = 0, failures = 0;

  image_browser_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #400000000; failures++; $display("watchdog");
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
  int n_browse = 0, n_transform = 0, n_zoom = 0, n_rot = 0, n_back = 0, n_skip = 0;

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

  // ---------------------------------------------------------------- drivers
  task automatic usb_byte(input logic [7:0] b);
    #2 usb_data = b;
    @(posedge clk);
    #3 usb_strobe = 1;
    repeat (3) @(posedge clk);
    #3 usb_strobe = 0;
    repeat (2) @(posedge clk);
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
    static rgb_t got [SW_ * SH];
    int n, bad;
    bit tf;
    int s_scroll, s_scale, s_angle, s_sel;
    wait_swaps(2);     // inputs idle: the frame now shown used the current state
    s_scroll = int'(scroll_pos); s_scale = int'(scale); s_angle = int'(angle);
    s_sel = int'(sel_slot); tf = (mode == MODE_TRANSFORM);
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
        end else if (transform_px(s_scale, s_angle, s_sel, x, y, e)) begin
          check(got[y * SW_ + x] == e, $sformatf("%s transform (%0d,%0d) got %h exp %h", what, x, y, got[y * SW_ + x], e));
        end else n_skip++;
      end
    if (tf) n_transform++; else n_browse++;
  endtask

  // ---------------------------------------------------------------- sequence
  initial begin
    repeat (5) @(negedge clk); rst = 0;
    send_image(3);
    check(slot_loaded == 4'b0001, "slot 0 loaded");
    check_frame("browse");
    press(BTN_SELECT);
    check(mode == MODE_TRANSFORM && sel_slot == 2'd0, "transform on slot 0");
    check_frame("identity");
    $display("bytes %0d swaps %0d browse %0d transform %0d skipped %0d",
             n_bytes, n_swap, n_browse, n_transform, n_skip);
    check(n_swap > 0 && n_browse > 0 && n_transform > 0, "both states shown");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
