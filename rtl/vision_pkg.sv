// vision_pkg: types and widths shared by the edge-detection pipeline.
//
// Pixels are 8-bit greyscale (the Y byte of the sensor's YCrCb output). A
// 3x3 neighbourhood is carried as a packed struct of nine pixels named after
// their place in the window: w<row><col>, where row 1 / column 1 hold the
// oldest pixel (two lines and two pixels before the newest one) and w33 holds
// the newest pixel. The gradient widths are those of the Sobel datapath:
// a 12-bit signed gradient, an 11-bit magnitude per axis and a 12-bit sum.
package vision_pkg;

  localparam int unsigned PIX_W  = 8;   // greyscale pixel
  localparam int unsigned GRAD_W = 12;  // signed Gx / Gy
  localparam int unsigned ABS_W  = 11;  // |Gx|, |Gy|
  localparam int unsigned MAG_W  = 12;  // |Gx| + |Gy|

  typedef logic [PIX_W-1:0] pixel_t;

  typedef struct packed {
    pixel_t w11, w12, w13;   // oldest line
    pixel_t w21, w22, w23;   // middle line
    pixel_t w31, w32, w33;   // newest line, w33 = newest pixel
  } window_t;

endpackage
