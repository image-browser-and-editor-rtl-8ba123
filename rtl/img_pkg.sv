// Shared types and constants of the image browser.
//
// rgb_t is the 24-bit pixel that the XGA output, the frame buffers and the
// colour look-up tables use (8 bits per channel, as the 24-bit RGB of the
// display requires). mode_t holds the two display states, browse and
// transform. The button indices name the positions of the labkit buttons in
// the button vector used by user_input and display_fsm; which button does
// what is this design's own choice.
package img_pkg;

  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb_t;

  typedef enum logic {
    MODE_BROWSE    = 1'b0,
    MODE_TRANSFORM = 1'b1
  } mode_t;

  // Button vector positions.
  localparam int unsigned BTN_LEFT   = 0;  // scroll left / decrease parameter
  localparam int unsigned BTN_RIGHT  = 1;  // scroll right / increase parameter
  localparam int unsigned BTN_SELECT = 2;  // browse -> transform
  localparam int unsigned BTN_BACK   = 3;  // transform -> browse
  localparam int unsigned BTN_RELOAD = 4;  // restart image loading at slot 0
  localparam int unsigned NUM_BTN    = 5;

  // Switch vector positions.
  localparam int unsigned SW_ROTATE   = 0;  // 0: buttons change scale, 1: rotation
  localparam int unsigned SW_BILINEAR = 1;  // 0: nearest pixel, 1: bilinear
  localparam int unsigned NUM_SW      = 2;

  // Source taps fetched per output pixel (bilinear needs four).
  localparam int unsigned NUM_TAPS   = 4;

  // Rotation angle: unsigned radians, Q3.13.
  localparam int unsigned ANGLE_W    = 16;
  localparam int unsigned ANGLE_FRAC = 13;
  localparam logic [ANGLE_W-1:0] ANGLE_2PI = 16'd51472;  // round(2*pi*2^13)

  // Scale: signed quarter-octaves, zoom = 2^(scale/4).
  localparam int unsigned SCALE_W    = 5;

  localparam rgb_t BACKGROUND = '{r: 8'h00, g: 8'h00, b: 8'h00};

endpackage
