// Testbench for video_out with a small raster (16x6 active): two model
// frame buffers return a colour that encodes buffer number and address,
// and front_sel toggles at random. Each output pixel, two clocks after its
// timing input, must be the colour of the selected buffer at that pixel's
// address, black while blanking, with the syncs delayed by the same two
// clocks.
module tb_video_out;
  import img_pkg::*;
  localparam int W = 16, H = 6, HT = 22, VT = 9, AW = $clog2(W * H);
  logic clk = 0, rst = 1;
  logic [4:0] hcount = 0;
  logic [3:0] vcount = 0;
  logic hsync = 1, vsync = 1, blank = 0, front_sel = 0;
  logic [AW-1:0] fb_rd_addr;
  rgb_t fb0_rd_data, fb1_rd_data, vga_rgb;
  logic vga_hsync, vga_vsync, vga_blank;
  int checks = 0, failures = 0;

  video_out #(.WIDTH(W), .HEIGHT(H), .HW(5), .VW(4)) dut (.*);
  always #5 clk = ~clk;

  function automatic rgb_t colour(input int buf_n, input int addr);
    return rgb_t'(24'((buf_n << 20) | (addr * 7 + 3)));
  endfunction

  // model buffers: registered reads
  always @(posedge clk) begin
    fb0_rd_data <= colour(0, int'(fb_rd_addr));
    fb1_rd_data <= colour(1, int'(fb_rd_addr));
  end

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // expected output pipeline
  rgb_t exp_q [$];
  logic [2:0] sync_q [$];
  int nonblack = 0, from1 = 0;

  initial begin
    repeat (3) @(negedge clk); rst = 0;
    for (int f = 0; f < 4; f++)
      for (int v = 0; v < VT; v++)
        for (int h = 0; h < HT; h++) begin
          @(negedge clk);
          hcount = 5'(h); vcount = 4'(v);
          blank = (h >= W) || (v >= H);
          hsync = !(h >= W + 1 && h < W + 3);
          vsync = !(v >= H + 1 && v < H + 2);
          if ($urandom_range(0, 9) == 0) front_sel = ~front_sel;
          exp_q.push_back(blank ? BACKGROUND : colour(int'(front_sel), v * W + h));
          sync_q.push_back({hsync, vsync, blank});
          if (exp_q.size() > 2) begin
            rgb_t e;
            logic [2:0] s;
            e = exp_q.pop_front();
            s = sync_q.pop_front();
            checks++;
            if (vga_rgb !== e || {vga_hsync, vga_vsync, vga_blank} !== s) begin
              failures++;
              $display("h%0d v%0d got %h %b exp %h %b", h, v, vga_rgb, {vga_hsync, vga_vsync, vga_blank}, e, s);
            end
            if (e != BACKGROUND) nonblack++;
            if (e[23:20] == 4'd1) from1++;
          end
        end
    checks++;
    if (nonblack == 0 || from1 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
