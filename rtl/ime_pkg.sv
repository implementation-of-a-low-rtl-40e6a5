// ime_pkg: types and constants shared by the integer motion estimator.
//
// The estimator evaluates one 32x32 CTU against every position of a 64x64
// search area and, for each of the 165 prediction partitions of that CTU,
// keeps the smallest sum of absolute differences (SAD) and its position.
// The CTU size (32x32), the PU/PE counts and the 165-partition set follow
// the HEVC partition rules the design is built for; the pixel width and the
// ordering of the 165 results are this design's own choices.
//
// Order of the 165 SAD results (index -> partition).  "CU" raster order is
// row-major over the CUs of that size inside the 32x32 CTU; inside one CU the
// parts are listed top before bottom, left before right.
//     0        32x32 2Nx2N
//     1..2     32x32 2NxN   (32x16 top, bottom)
//     3..4     32x32 Nx2N   (16x32 left, right)
//     5..8     32x32 NxN    (16x16, raster)
//     9..10    32x32 nLx2N  (8x32 left, 24x32 right)
//    11..12    32x32 nRx2N  (24x32 left, 8x32 right)
//    13..14    32x32 2NxnU  (32x8 top, 32x24 bottom)
//    15..16    32x32 2NxnD  (32x24 top, 32x8 bottom)
//    17..20    16x16 2Nx2N  (4 CUs)
//    21..28    16x16 2NxN   (CU, then top/bottom)
//    29..36    16x16 Nx2N   (CU, then left/right)
//    37..52    16x16 NxN    (CU, then 4 sub-blocks in raster)
//    53..60    16x16 nLx2N  (CU, then 4x16 left / 12x16 right)
//    61..68    16x16 nRx2N  (CU, then 12x16 left / 4x16 right)
//    69..76    16x16 2NxnU  (CU, then 16x4 top / 16x12 bottom)
//    77..84    16x16 2NxnD  (CU, then 16x12 top / 16x4 bottom)
//    85..100   8x8   2Nx2N  (16 CUs)
//   101..132   8x8   2NxN   (CU, then 8x4 top/bottom)
//   133..164   8x8   Nx2N   (CU, then 4x8 left/right)
package ime_pkg;

  // CTU edge in pixels, number of PUs and PEs per PU.
  localparam int unsigned CTU      = 32;
  // Number of partition SADs produced for one search position.
  localparam int unsigned NUM_SADS = 165;
  // Pixel bit depth.
  localparam int unsigned PIX_W    = 8;
  // SAD width: enough for 32*32 differences of PIX_W bits.
  localparam int unsigned SAD_W    = PIX_W + 10;

  typedef logic [PIX_W-1:0] pix_t;
  typedef logic [SAD_W-1:0] sad_t;

  // Base index of every partition group in the 165-entry result vector.
  localparam int unsigned IDX_32_2NX2N = 0;
  localparam int unsigned IDX_32_2NXN  = 1;
  localparam int unsigned IDX_32_NX2N  = 3;
  localparam int unsigned IDX_32_NXN   = 5;
  localparam int unsigned IDX_32_NLX2N = 9;
  localparam int unsigned IDX_32_NRX2N = 11;
  localparam int unsigned IDX_32_2NXNU = 13;
  localparam int unsigned IDX_32_2NXND = 15;
  localparam int unsigned IDX_16_2NX2N = 17;
  localparam int unsigned IDX_16_2NXN  = 21;
  localparam int unsigned IDX_16_NX2N  = 29;
  localparam int unsigned IDX_16_NXN   = 37;
  localparam int unsigned IDX_16_NLX2N = 53;
  localparam int unsigned IDX_16_NRX2N = 61;
  localparam int unsigned IDX_16_2NXNU = 69;
  localparam int unsigned IDX_16_2NXND = 77;
  localparam int unsigned IDX_8_2NX2N  = 85;
  localparam int unsigned IDX_8_2NXN   = 101;
  localparam int unsigned IDX_8_NX2N   = 133;

  // Direction in which the propagation registers move for one cycle.
  typedef enum logic [1:0] {
    SHIFT_HOLD  = 2'd0,  // keep contents
    SHIFT_DOWN  = 2'd1,  // window moves one row down: new row enters at the bottom
    SHIFT_UP    = 2'd2,  // window moves one row up: new row enters at the top
    SHIFT_RIGHT = 2'd3   // window moves one column right: new column enters at the right
  } shift_e;

endpackage
