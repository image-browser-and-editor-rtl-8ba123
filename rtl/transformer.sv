// Transformer: scaling and rotation of the selected image about its centre.
//
// The block works backwards from the screen: for every output pixel, in
// raster order, it gives the source-image position that lands there, and
// whether that position lies inside the image. The display FSM fetches that
// source pixel (nearest-neighbour, the "simple rotation" algorithm) or the
// 2x2 source pixels around the fractional position (bilinear), so the
// visible region of the transformed image is what ends up in the frame.
//
// Parameters of a frame: `scale` is signed, in quarter octaves
// (zoom = 2^(scale/4), positive zooms in); `angle` is unsigned radians,
// Q3.13, in [0, 2*pi). With inverse zoom m = 2^(-scale/4), A = m*cos(angle)
// and B = m*sin(angle), the output pixel centre (x+0.5, y+0.5), taken
// relative to the screen centre as (dx, dy), maps to
//   u = IMG_W/2 + A*dx + B*dy,   v = IMG_H/2 - B*dx + A*dy
// in source pixel units (pixel k spans [k, k+1)). Setup: `start` latches
// scale and angle, a CORDIC computes cos and sin (18 clocks), two more
// clocks form A, B and the position of output pixel (0, 0); then `ready`
// rises. From then on src_u/src_v (Q.16) and src_x/src_y (floor) describe
// the current output pixel, and each `step` advances to the next one
// (adding A and -B along a row, B and A at a new row), so one pixel per
// clock is produced with two adders per coordinate.
//
// A signed scale, an unsigned angle in radians and the nearest-pixel and
// bilinear algorithms follow the design description. The fixed-point
// formats, the quarter-octave scale steps, the rotation sense and the
// inverse-mapping scheme are this design's choices. The area-mapped
// algorithm of the description is not built.
module transformer
  import img_pkg::*;
#(
  parameter int unsigned OUT_W = 1024,
  parameter int unsigned OUT_H = 768,
  parameter int unsigned IMG_W = 1024,
  parameter int unsigned IMG_H = 768,
  localparam int unsigned CW   = 36,   // Q20.16 coordinates
  localparam int unsigned XW   = $clog2(IMG_W),
  localparam int unsigned YW   = $clog2(IMG_H),
  localparam int unsigned OXW  = $clog2(OUT_W)
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     start,
  input  logic signed [SCALE_W-1:0] scale,
  input  logic [ANGLE_W-1:0]       angle,
  output logic                     ready,
  input  logic                     step,
  output logic signed [CW-1:0]     src_u,
  output logic signed [CW-1:0]     src_v,
  output logic [XW-1:0]            src_x,
  output logic [YW-1:0]            src_y,
  output logic                     in_image
);

  typedef enum logic [1:0] {T_IDLE, T_TRIG, T_COEF, T_ORIGIN} tstate_t;
  tstate_t state;

  // round(2^(-j/4) * 2^16), j = 0..3
  function automatic logic [16:0] inv_frac(input logic [1:0] j);
    case (j)
      2'd0:    return 17'd65536;
      2'd1:    return 17'd55109;
      2'd2:    return 17'd46341;
      default: return 17'd38968;
    endcase
  endfunction

  // (0.5 - OUT_W/2) and (0.5 - OUT_H/2) in Q.16
  localparam logic signed [CW-1:0] DX0 = CW'((64'sd1 - 64'(OUT_W)) * 64'sd32768);
  localparam logic signed [CW-1:0] DY0 = CW'((64'sd1 - 64'(OUT_H)) * 64'sd32768);
  localparam logic signed [CW-1:0] CX  = CW'(64'(IMG_W) * 64'sd32768);
  localparam logic signed [CW-1:0] CY  = CW'(64'(IMG_H) * 64'sd32768);

  logic signed [SCALE_W-1:0] scale_q;
  logic signed [17:0]        cos_q16, sin_q16;
  logic                      trig_done;
  logic signed [CW-1:0]      coef_a, coef_b;     // A, B in Q.16
  logic signed [CW-1:0]      row_u, row_v;       // position at column 0
  logic [OXW-1:0]            col;

  cordic_sincos u_cordic (
    .clk     (clk),
    .rst     (rst),
    .start   (start),
    .angle   (angle),
    .cos_q16 (cos_q16),
    .sin_q16 (sin_q16),
    .done    (trig_done)
  );

  // inverse zoom 2^(-scale/4) in Q.16: table entry, shifted by whole octaves
  logic [CW-1:0]         inv_zoom;
  logic signed [SCALE_W-1:0] octave;
  always_comb begin
    octave = scale_q >>> 2;
    if (octave >= 0) inv_zoom = CW'(inv_frac(scale_q[1:0])) >> octave;
    else             inv_zoom = CW'(inv_frac(scale_q[1:0])) << (-octave);
  end

  logic signed [63:0] prod_a, prod_b;
  assign prod_a = 64'(signed'(inv_zoom)) * 64'(cos_q16);
  assign prod_b = 64'(signed'(inv_zoom)) * 64'(sin_q16);

  logic signed [63:0] org_u, org_v;
  assign org_u = 64'(CX) + ((64'(coef_a) * 64'(DX0) + 64'(coef_b) * 64'(DY0)) >>> 16);
  assign org_v = 64'(CY) + ((64'(coef_a) * 64'(DY0) - 64'(coef_b) * 64'(DX0)) >>> 16);

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= T_IDLE;
      ready   <= 1'b0;
      scale_q <= '0;
      coef_a  <= '0;
      coef_b  <= '0;
      row_u   <= '0;
      row_v   <= '0;
      src_u   <= '0;
      src_v   <= '0;
      col     <= '0;
    end else begin
      case (state)
        T_IDLE: begin
          if (start) begin
            scale_q <= scale;
            ready   <= 1'b0;
            state   <= T_TRIG;
          end else if (ready && step) begin
            if (col == OXW'(OUT_W - 1)) begin
              col   <= '0;
              row_u <= row_u + coef_b;
              row_v <= row_v + coef_a;
              src_u <= row_u + coef_b;
              src_v <= row_v + coef_a;
            end else begin
              col   <= col + 1'b1;
              src_u <= src_u + coef_a;
              src_v <= src_v - coef_b;
            end
          end
        end
        T_TRIG: if (trig_done) begin
          coef_a <= CW'(prod_a >>> 16);
          coef_b <= CW'(prod_b >>> 16);
          state  <= T_COEF;
        end
        T_COEF: begin
          row_u <= CW'(org_u);
          row_v <= CW'(org_v);
          src_u <= CW'(org_u);
          src_v <= CW'(org_v);
          col   <= '0;
          state <= T_ORIGIN;
        end
        default: begin  // T_ORIGIN
          ready <= 1'b1;
          state <= T_IDLE;
        end
      endcase
    end
  end

  // integer source pixel and the inside test
  logic signed [CW-17:0] iu, iv;
  assign iu     = src_u[CW-1:16];
  assign iv     = src_v[CW-1:16];
  assign src_x  = XW'(iu);
  assign src_y  = YW'(iv);
  assign in_image = (iu >= 0) && (iu < (CW-16)'(IMG_W)) &&
                  (iv >= 0) && (iv < (CW-16)'(IMG_H));

endmodule
