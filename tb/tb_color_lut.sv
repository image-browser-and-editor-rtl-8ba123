// Testbench for color_lut: writes random red, green and blue tables for
// every slot, one byte at a time, then looks up every (slot, index) on
// each of four read ports, with the other ports reading random entries at
// the same time, and checks the 24-bit colours one clock later.
module tb_color_lut;
  import img_pkg::*;
  localparam int N = 4, SW = $clog2(N), P = 4;
  logic clk = 0, we = 0;
  logic [SW-1:0] wr_slot = 0;
  logic [P-1:0][SW-1:0] rd_slot = '0;
  logic [1:0] wr_chan = 0;
  logic [7:0] wr_index = 0, wr_data = 0;
  logic [P-1:0][7:0] rd_index = '0;
  rgb_t [P-1:0] rd_rgb;
  logic [7:0] ref_tab [N][3][256];
  int checks = 0, failures = 0;

  color_lut #(.NUM_IMAGES(N), .NUM_RD(P)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int s = 0; s < N; s++)
      for (int c = 0; c < 3; c++)
        for (int i = 0; i < 256; i++) begin
          @(negedge clk);
          we = 1; wr_slot = SW'(s); wr_chan = 2'(c); wr_index = 8'(i);
          wr_data = 8'($urandom); ref_tab[s][c][i] = wr_data;
        end
    // channel 3 is no table: it must not disturb any
    @(negedge clk); wr_chan = 2'd3; wr_slot = 0; wr_index = 0; wr_data = ~ref_tab[0][0][0];
    @(negedge clk); we = 0;
    for (int q = 0; q < P; q++)
      for (int s = 0; s < N; s++)
        for (int i = 0; i < 256; i++) begin
          for (int p = 0; p < P; p++) begin
            rd_slot[p]  = (p == q) ? SW'(s) : SW'($urandom_range(0, N - 1));
            rd_index[p] = (p == q) ? 8'(i) : 8'($urandom);
          end
          @(negedge clk);
          for (int p = 0; p < P; p++) begin
            checks++;
            if (rd_rgb[p].r !== ref_tab[rd_slot[p]][0][rd_index[p]] ||
                rd_rgb[p].g !== ref_tab[rd_slot[p]][1][rd_index[p]] ||
                rd_rgb[p].b !== ref_tab[rd_slot[p]][2][rd_index[p]]) begin
              failures++;
              $display("port %0d slot %0d idx %0d got %h", p, rd_slot[p], rd_index[p], rd_rgb[p]);
            end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
