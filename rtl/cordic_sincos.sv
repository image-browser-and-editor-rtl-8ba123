// Iterative CORDIC: cosine and sine of an unsigned angle in radians.
//
// The angle is unsigned Q3.13 radians in [0, 2*pi). It is first folded into
// [-pi/2, pi/2] (remembering a sign flip for the two far quadrants), then
// rotated from (K, 0) in 16 CORDIC micro-rotations, one per clock, with 18
// fractional bits inside. cos and sin come out as signed Q2.16 with an
// error below 2^-13. `start` begins a computation; `done` pulses 18 clocks
// later with the results, which then hold until the next start.
module cordic_sincos
  import img_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  input  logic [ANGLE_W-1:0] angle,
  output logic signed [17:0] cos_q16,
  output logic signed [17:0] sin_q16,
  output logic               done
);

  localparam int signed PI_Q16      = 205887;
  localparam int signed HALF_PI_Q16 = 102944;
  localparam int signed TWO_PI_Q16  = 411775;
  localparam int signed K_Q18       = 159188;  // prod 1/sqrt(1+2^-2i), i<16

  function automatic logic signed [23:0] atan_q16(input logic [3:0] i);
    // round(atan(2^-i) * 2^16)
    case (i)
      4'd0:  return 24'sd51472;
      4'd1:  return 24'sd30386;
      4'd2:  return 24'sd16055;
      4'd3:  return 24'sd8150;
      4'd4:  return 24'sd4091;
      4'd5:  return 24'sd2047;
      4'd6:  return 24'sd1024;
      4'd7:  return 24'sd512;
      4'd8:  return 24'sd256;
      4'd9:  return 24'sd128;
      4'd10: return 24'sd64;
      4'd11: return 24'sd32;
      4'd12: return 24'sd16;
      4'd13: return 24'sd8;
      4'd14: return 24'sd4;
      default: return 24'sd2;
    endcase
  endfunction

  logic signed [23:0] x, y, z;
  logic [3:0]         iter;
  logic               busy, neg, fin;

  // angle folding, combinational on the input
  logic signed [23:0] z0;
  logic               neg0;
  always_comb begin
    z0   = 24'(angle) <<< 3;
    neg0 = 1'b0;
    if (z0 >= 24'(PI_Q16)) z0 = z0 - 24'(TWO_PI_Q16);
    if (z0 > 24'(HALF_PI_Q16)) begin
      z0   = z0 - 24'(PI_Q16);
      neg0 = 1'b1;
    end else if (z0 < -24'(HALF_PI_Q16)) begin
      z0   = z0 + 24'(PI_Q16);
      neg0 = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      x <= '0; y <= '0; z <= '0; iter <= '0;
      busy <= 1'b0; neg <= 1'b0; done <= 1'b0; fin <= 1'b0;
      cos_q16 <= 18'sd65536; sin_q16 <= '0;
    end else begin
      done <= 1'b0;
      fin  <= 1'b0;
      if (fin) begin
        // round from Q18 to Q16 once the last rotation has landed
        cos_q16 <= 18'(((neg ? -x : x) + 24'sd2) >>> 2);
        sin_q16 <= 18'(((neg ? -y : y) + 24'sd2) >>> 2);
        done    <= 1'b1;
      end
      if (start) begin
        x    <= 24'(K_Q18);
        y    <= '0;
        z    <= z0;
        neg  <= neg0;
        iter <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        if (z >= 0) begin
          x <= x - (y >>> iter);
          y <= y + (x >>> iter);
          z <= z - atan_q16(iter);
        end else begin
          x <= x + (y >>> iter);
          y <= y - (x >>> iter);
          z <= z + atan_q16(iter);
        end
        iter <= iter + 1'b1;
        if (iter == 4'd15) begin
          busy <= 1'b0;
          fin  <= 1'b1;
        end
      end
    end
  end

endmodule
