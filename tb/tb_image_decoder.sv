// Testbench for image_decoder at a reduced image size (8x4, three slots):
// streams four and a half images of random bytes (so slot 0 is written
// twice), collects every pixel and LUT write in shadow memories, and
// compares them with the layout the stream format implies: for each image
// 256 red, 256 green and 256 blue entries, then the pixels in raster order.
// Also checks the loaded flags as images complete, that an image being
// overwritten loses its flag, and the restart input.
module tb_image_decoder;
  localparam int N = 3, W = 8, H = 4, PIX = W * H, IMG_BYTES = 768 + PIX;
  localparam int AW = $clog2(N * PIX), SW = $clog2(N);
  logic clk = 0, rst = 1, restart = 0;
  logic [7:0] byte_data = 0;
  logic byte_valid = 0;
  logic pix_we, lut_we;
  logic [AW-1:0] pix_addr;
  logic [7:0] pix_data, lut_index, lut_data;
  logic [SW-1:0] lut_slot, cur_slot;
  logic [1:0] lut_chan;
  logic [N-1:0] slot_loaded;
  int checks = 0, failures = 0;

  logic [7:0] got_pix [N * PIX];
  logic [7:0] got_lut [N][3][256];
  logic [7:0] exp_pix [N * PIX];
  logic [7:0] exp_lut [N][3][256];
  int writes = 0;

  image_decoder #(.NUM_IMAGES(N), .IMG_W(W), .IMG_H(H)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (!rst) begin
    if (pix_we) begin got_pix[pix_addr] <= pix_data; writes++; end
    if (lut_we) begin got_lut[lut_slot][lut_chan][lut_index] <= lut_data; writes++; end
  end

  task automatic send(input logic [7:0] b);
    @(negedge clk); byte_data = b; byte_valid = 1;
    @(negedge clk); byte_valid = 0;
    repeat ($urandom_range(0, 2)) @(negedge clk);
  endtask

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    for (int i = 0; i < N * PIX; i++) begin got_pix[i] = 0; exp_pix[i] = 0; end
    repeat (3) @(negedge clk); rst = 0;
    // 4.5 images: slots 0,1,2,0 then half of slot 1
    for (int img = 0; img < 5; img++) begin
      int slot, nbytes;
      slot = img % N;
      nbytes = (img == 4) ? 768 + PIX / 2 : IMG_BYTES;
      for (int k = 0; k < nbytes; k++) begin
        logic [7:0] b;
        b = 8'($urandom);
        if (k < 768) exp_lut[slot][k / 256][k % 256] = b;
        else         exp_pix[slot * PIX + k - 768] = b;
        send(b);
        if (k == 0 && img >= N) check(slot_loaded[slot] == 0, "flag cleared on overwrite");
      end
      @(negedge clk);
      if (img < 4) begin
        check(slot_loaded[slot] == 1, $sformatf("slot %0d loaded", slot));
        check(cur_slot == SW'((img + 1) % N), "next slot");
      end
    end
    check(slot_loaded == 3'b101, "partial slot 1 not loaded");
    check(writes == 4 * IMG_BYTES + 768 + PIX / 2, $sformatf("one write per byte (%0d)", writes));
    for (int a = 0; a < N * PIX; a++) check(got_pix[a] == exp_pix[a], $sformatf("pixel %0d", a));
    for (int s = 0; s < N; s++)
      for (int c = 0; c < 3; c++)
        for (int i = 0; i < 256; i++)
          check(got_lut[s][c][i] == exp_lut[s][c][i], $sformatf("lut %0d %0d %0d", s, c, i));
    // restart goes back to the start of slot 0
    @(negedge clk); restart = 1; @(negedge clk); restart = 0;
    check(cur_slot == 0, "restart to slot 0");
    send(8'h5a);
    @(negedge clk);
    check(got_lut[0][0][0] == 8'h5a, "restart begins with red LUT entry 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
