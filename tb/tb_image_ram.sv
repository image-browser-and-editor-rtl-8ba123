// Testbench for image_ram at a reduced size with four read ports: random
// writes mirrored in a reference array, then independent random reads on
// every port checked one clock after the address, including reads of an
// address written in the same clock.
module tb_image_ram;
  localparam int N = 3, W = 16, H = 8, DEPTH = N * W * H, AW = $clog2(DEPTH), P = 4;
  logic clk = 0, we = 0;
  logic [AW-1:0] wr_addr = 0;
  logic [P-1:0][AW-1:0] rd_addr = '0;
  logic [7:0] wr_data = 0;
  logic [P-1:0][7:0] rd_data;
  logic [7:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  image_ram #(.NUM_IMAGES(N), .IMG_W(W), .IMG_H(H), .NUM_RD(P)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); we = 1; wr_addr = AW'(a); wr_data = 8'($urandom); ref_mem[a] = wr_data;
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = ($urandom_range(0, 1) == 1);
      wr_addr = AW'($urandom_range(0, DEPTH - 1));
      wr_data = 8'($urandom);
      for (int p = 0; p < P; p++)
        rd_addr[p] = ($urandom_range(0, 3) == 0) ? wr_addr : AW'($urandom_range(0, DEPTH - 1));
      begin
        logic [7:0] exp [P];
        for (int p = 0; p < P; p++) exp[p] = ref_mem[rd_addr[p]];  // read-before-write
        if (we) ref_mem[wr_addr] = wr_data;
        @(negedge clk);
        we = 0;
        for (int p = 0; p < P; p++) begin
          checks++;
          if (rd_data[p] !== exp[p]) begin
            failures++; $display("port %0d addr %0d got %h exp %h", p, rd_addr[p], rd_data[p], exp[p]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
