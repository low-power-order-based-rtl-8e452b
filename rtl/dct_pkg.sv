// dct_pkg: constants and types shared by the order-based DCT processor.
//
// The processor computes C = E * D for one N x N block (N = 2**LOG2N, 8 by
// default). Each cosine ROM word is {n, E}: n is the original column of the
// coefficient in its row (LOG2N bits, bits <11:9> for N = 8) and E its signed
// value (COEFF_W = 9 bits, bits <8:0>), the split given for the scheme's
// architecture. Pixel and accumulator widths are this design's own choice.
package dct_pkg;

  // Width of the signed cosine value field of a ROM word (<8:0>).
  localparam int unsigned COEFF_W = 9;
  // Width of an unsigned pixel.
  localparam int unsigned PIXEL_W = 8;
  // Multiplier operand width for the pixel: one zero sign bit above the pixel.
  localparam int unsigned PIXOP_W = PIXEL_W + 1;
  // Product width of COEFF_W x PIXOP_W signed multiplication.
  localparam int unsigned PROD_W = COEFF_W + PIXOP_W;
  // Accumulator width: a sum of 8 products of |E| <= 255 and D <= 255 needs
  // 20 bits signed; one guard bit is added.
  localparam int unsigned ACC_W = PROD_W + 3;

  // Order of the two outer loops.
  //  LOOP_COL_OUTER: pixel column k is the outermost loop (the algorithm's flowchart);
  //                  the 3-bit pixel counter steps after every N*N accesses.
  //  LOOP_COL_INNER: pixel column k steps after every N accesses, the cosine
  //                  row x is the outer loop.
  typedef enum logic {
    LOOP_COL_OUTER = 1'b0,
    LOOP_COL_INNER = 1'b1
  } loop_order_e;

endpackage : dct_pkg
