// ip_pkg: types and constants shared by the image-processing datapath.
//
// A pixel in the image memory is 24 bits, 8 bits per colour, red in the
// most significant byte (the order of the image memory file). A converted
// pixel carries 8-bit Y, Cb and Cr. The default image size, 160 columns by
// 106 rows, is the size of the test images the framework reshapes back into
// a picture. The colour-conversion coefficients are those of the RGB to
// YCbCr matrix below, turned into signed fixed point with COEF_FRAC
// fractional bits (round to nearest); the fixed-point width is this
// design's own choice.
package ip_pkg;

  localparam int unsigned IMG_W      = 160;           // columns per row
  localparam int unsigned IMG_H      = 106;           // rows per image
  localparam int unsigned IMG_PIXELS = IMG_W * IMG_H; // 16960 pixels

  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb_t;

  typedef struct packed {
    logic [7:0] y;
    logic [7:0] cb;
    logic [7:0] cr;
  } ycbcr_t;

  // Which converted component goes to the 8-bit image-file output.
  typedef enum logic [1:0] {
    COMP_Y  = 2'd0,
    COMP_CB = 2'd1,
    COMP_CR = 2'd2
  } comp_e;

  // Fixed point of the coefficients: value = integer / 2**COEF_FRAC.
  localparam int COEF_FRAC = 12;

  // Conversion matrix (rows Y, Cb, Cr; columns R, G, B) and offsets:
  //   Y  =  16 + 0.184 R + 0.614 G + 0.062 B
  //   Cb = 128 - 0.101 R - 0.339 G + 0.439 B
  //   Cr = 128 + 0.439 R - 0.399 G - 0.040 B
  localparam real K_REAL [3][3] = '{'{ 0.184,  0.614,  0.062},
                                    '{-0.101, -0.339,  0.439},
                                    '{ 0.439, -0.399, -0.040}};
  localparam int  OFFSET [3]    = '{16, 128, 128};

  // Coefficient in fixed point; a real-to-int cast rounds to nearest.
  function automatic int coef_fix(input logic [1:0] row, input logic [1:0] col, input int frac);
    return int'(K_REAL[row][col] * real'(2 ** frac));
  endfunction

endpackage
