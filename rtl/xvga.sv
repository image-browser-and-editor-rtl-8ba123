// XVGA timing generator: 1024x768 at 60 Hz from the 65 MHz video clock.
//
// Two counters walk the full raster, H_TOTAL = 1344 clocks per line and
// V_TOTAL = 806 lines per frame (1,083,264 clocks, 60.0 Hz at 65 MHz).
// hcount/vcount give the pixel position; blank is high outside the
// 1024x768 active area; hsync and vsync are active low. vblank_start pulses
// for one clock at the first pixel of the first line after the active area;
// the display FSM swaps frame buffers there. All outputs are registered
// together, so they describe the same pixel in the same cycle.
//
// The 65 MHz clock and the XGA resolution come from the design description;
// the porch and sync widths are the standard VESA 1024x768@60 timing, and
// the sync polarity is this design's choice.
module xvga #(
  parameter int unsigned H_ACTIVE = 1024,
  parameter int unsigned H_FP     = 24,
  parameter int unsigned H_SYNC   = 136,
  parameter int unsigned H_BP     = 160,
  parameter int unsigned V_ACTIVE = 768,
  parameter int unsigned V_FP     = 3,
  parameter int unsigned V_SYNC   = 6,
  parameter int unsigned V_BP     = 29,
  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP,
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP,
  localparam int unsigned HW      = $clog2(H_TOTAL),
  localparam int unsigned VW      = $clog2(V_TOTAL)
) (
  input  logic          clk,
  input  logic          rst,
  output logic [HW-1:0] hcount,
  output logic [VW-1:0] vcount,
  output logic          hsync,
  output logic          vsync,
  output logic          blank,
  output logic          vblank_start
);

  logic [HW-1:0] h_next;
  logic [VW-1:0] v_next;

  always_comb begin
    h_next = hcount + 1'b1;
    v_next = vcount;
    if (hcount == HW'(H_TOTAL - 1)) begin
      h_next = '0;
      v_next = (vcount == VW'(V_TOTAL - 1)) ? '0 : vcount + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount       <= '0;
      vcount       <= '0;
      hsync        <= 1'b1;
      vsync        <= 1'b1;
      blank        <= 1'b0;
      vblank_start <= 1'b0;
    end else begin
      hcount       <= h_next;
      vcount       <= v_next;
      blank        <= (h_next >= HW'(H_ACTIVE)) || (v_next >= VW'(V_ACTIVE));
      hsync        <= !((h_next >= HW'(H_ACTIVE + H_FP)) &&
                        (h_next <  HW'(H_ACTIVE + H_FP + H_SYNC)));
      vsync        <= !((v_next >= VW'(V_ACTIVE + V_FP)) &&
                        (v_next <  VW'(V_ACTIVE + V_FP + V_SYNC)));
      vblank_start <= (h_next == '0) && (v_next == VW'(V_ACTIVE));
    end
  end

endmodule
