// Bilinear blend of a 2x2 neighbourhood of source colours.
//
// The four taps are the source pixels at (x0, y0), (x0+1, y0), (x0, y0+1)
// and (x0+1, y0+1); fx and fy are the sample position's fractions between
// them in 1/256ths. Each tap's weight is the area of the opposite
// rectangle, (256-fx)(256-fy), fx(256-fy), (256-fx)fy and fx*fy, which
// always add up to 65536. A tap whose valid bit is clear (outside the
// image) contributes the background colour. The red, green and blue
// channels are blended by three identical, independent datapaths and merged
// at the end; the result is rounded to nearest. Purely combinational.
// With fx = fy = 0 the output is exactly tap 0, which is how nearest-pixel
// and browse drawing pass through unchanged.
//
// Bilinear interpolation and blending the three channels separately follow
// the design description; the 8-bit weights and the treatment of taps
// outside the image are this design's choices.
module bilinear_blend
  import img_pkg::*;
(
  input  rgb_t [3:0] tap,
  input  logic [3:0] tap_valid,
  input  logic [7:0] fx,
  input  logic [7:0] fy,
  output rgb_t       out
);

  logic [8:0]  ifx, ify;
  logic [16:0] w [4];
  rgb_t        c [4];

  always_comb begin
    ifx  = 9'd256 - 9'(fx);
    ify  = 9'd256 - 9'(fy);
    w[0] = 17'(ifx * ify);
    w[1] = 17'(9'(fx) * ify);
    w[2] = 17'(ifx * 9'(fy));
    w[3] = 17'(9'(fx) * 9'(fy));
    for (int i = 0; i < 4; i++) c[i] = tap_valid[i] ? tap[i] : BACKGROUND;
  end

  function automatic logic [7:0] blend_chan(input logic [7:0] a, input logic [7:0] b,
                                            input logic [7:0] cc, input logic [7:0] d,
                                            input logic [16:0] w0, input logic [16:0] w1,
                                            input logic [16:0] w2, input logic [16:0] w3);
    logic [25:0] acc;
    acc = 26'(w0 * a) + 26'(w1 * b) + 26'(w2 * cc) + 26'(w3 * d) + 26'd32768;
    return acc[23:16];
  endfunction

  assign out.r = blend_chan(c[0].r, c[1].r, c[2].r, c[3].r, w[0], w[1], w[2], w[3]);
  assign out.g = blend_chan(c[0].g, c[1].g, c[2].g, c[3].g, w[0], w[1], w[2], w[3]);
  assign out.b = blend_chan(c[0].b, c[1].b, c[2].b, c[3].b, w[0], w[1], w[2], w[3]);

endmodule
