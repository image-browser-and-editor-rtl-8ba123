// Testbench for xvga at its default 1024x768 timing: runs two frames and
// measures, against the VESA 1024x768@60 numbers, the line and frame
// lengths, the active pixels per line and active lines per frame, the sync
// pulse widths and positions, and the vblank_start pulse (once per frame,
// at the first pixel of line 768).
module tb_xvga;
  logic clk = 0, rst = 1;
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic hsync, vsync, blank, vblank_start;
  int checks = 0, failures = 0;

  xvga dut (.*);
  always #5 clk = ~clk;

  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int cyc = 0, last_hs_fall = -1, hs_low = 0, vb_count = 0, last_vb = -1;
  int active_in_line = 0, lines_active = 0, line_len = 0;
  int vs_low_lines = 0, last_vs_fall = -1;
  logic hs_d = 1, vs_d = 1;
  bit started = 0;

  initial begin
    repeat (3) @(posedge clk); rst = 0;
    forever begin
      @(posedge clk); #1;
      cyc++;
      // horizontal
      if (!hsync) hs_low++;
      if (hs_d && !hsync) begin
        check(hcount == 1024 + 24, "hsync starts after front porch");
        if (last_hs_fall >= 0) check(cyc - last_hs_fall == 1344, "line length");
        last_hs_fall = cyc;
      end
      if (!hs_d && hsync) begin check(hs_low == 136, "hsync width"); hs_low = 0; end
      if (hcount == 0 && cyc > 1) begin
        if (active_in_line != 0 && started) begin
          check(active_in_line == 1024, $sformatf("active pixels per line %0d v%0d", active_in_line, vcount));
          lines_active++;
        end
        active_in_line = 0;
        started = 1;
      end
      if (!blank) active_in_line++;
      // vertical
      if (vs_d && !vsync) begin
        check(vcount == 768 + 3 && hcount == 0, "vsync after vertical front porch");
        if (last_vs_fall >= 0) check(cyc - last_vs_fall == 1344 * 806, "frame length");
        last_vs_fall = cyc;
      end
      if (!vs_d && vsync) check(cyc - last_vs_fall == 6 * 1344, "vsync width");
      if (vblank_start) begin
        check(vcount == 768 && hcount == 0, "vblank_start position");
        if (last_vb >= 0) check(cyc - last_vb == 1344 * 806, "vblank period");
        if (vb_count > 0) check(lines_active == 768, "active lines per frame");
        lines_active = 0;
        last_vb = cyc;
        vb_count++;
      end
      hs_d = hsync; vs_d = vsync;
      if (vb_count == 3) break;
    end
    check(vb_count == 3, "three frames");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
