// Testbench for frame_buffer at a reduced size: fills the frame with random
// colours, reads it back while the write port carries data without its
// enable, overwrites random pixels while reading others, and checks every
// read one clock after its address against a reference array.
module tb_frame_buffer;
  import img_pkg::*;
  localparam int W = 24, H = 10, DEPTH = W * H, AW = $clog2(DEPTH);
  logic clk = 0, we = 0;
  logic [AW-1:0] wr_addr = 0, rd_addr = 0;
  rgb_t wr_data = '0, rd_data;
  rgb_t ref_mem [DEPTH];
  int checks = 0, failures = 0;

  frame_buffer #(.WIDTH(W), .HEIGHT(H)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); we = 1; wr_addr = AW'(a); wr_data = rgb_t'($urandom); ref_mem[a] = wr_data;
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < DEPTH; a++) begin
      // write port busy but not enabled: nothing may change
      wr_addr = AW'($urandom_range(0, DEPTH - 1)); wr_data = rgb_t'($urandom);
      rd_addr = AW'(a);
      @(negedge clk);
      checks++;
      if (rd_data !== ref_mem[a]) begin failures++; $display("addr %0d got %h exp %h", a, rd_data, ref_mem[a]); end
    end
    for (int i = 0; i < 1000; i++) begin
      rgb_t exp;
      we = 1; wr_addr = AW'($urandom_range(0, DEPTH - 1)); wr_data = rgb_t'($urandom);
      rd_addr = AW'($urandom_range(0, DEPTH - 1));
      exp = ref_mem[rd_addr];
      ref_mem[wr_addr] = wr_data;
      @(negedge clk);
      checks++;
      if (rd_data !== exp) begin failures++; $display("addr %0d got %h exp %h", rd_addr, rd_data, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
