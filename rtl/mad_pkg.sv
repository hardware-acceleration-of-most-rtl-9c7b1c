// mad_pkg: constants and types shared by the blocks of the MAD appearance-stage
// statistics accelerator.
//
// The accelerator computes, for every 16x16 block of an image taken with a
// stride of 4 pixels (75% overlap), the standard deviation, skewness and
// kurtosis of the block. The block size, the stride and the normalisations by
// 256 and 255 follow the algorithm; pixel and result formats are fixed point,
// a choice of this design (the algorithm works in single-precision float).
//
// Number formats:
//   pixel      PIX_W-bit unsigned integer code
//   A2,A3,A4   exact sums of d^k over the block, d = 256*x - sum(x)
//              (d is 256 times the deviation from the block mean)
//   std        unsigned, STD_FRAC fraction bits, in pixel-code units
//   skw        two's complement, SKW_FRAC fraction bits
//   krt        unsigned, KRT_FRAC fraction bits
package mad_pkg;

  localparam int unsigned BLK    = 16;          // block side
  localparam int unsigned STRIDE = 4;           // block step in pixels
  localparam int unsigned NPIX   = BLK * BLK;   // pixels per block (256), for users
  localparam int unsigned PIX_W  = 16;          // pixel code width

  // Largest supported image side is 4*MAX_P pixels (4096 for MAX_P = 1024).
  localparam int unsigned MAX_P  = 1024;
  localparam int unsigned IDX_W  = $clog2(MAX_P + 1);         // block index / count of indices
  localparam int unsigned ADDR_W = 2 * $clog2(STRIDE * MAX_P); // pixel address in one image
  localparam int unsigned OIDX_W = 2 * $clog2(MAX_P);          // result index

  localparam int unsigned SUM_W  = PIX_W + 8;        // sum of 256 pixels
  localparam int unsigned DEV_W  = PIX_W + 9;        // signed 256*x - sum
  localparam int unsigned A2_W   = 2 * (PIX_W + 8) + 8;      // 56
  localparam int unsigned A3_W   = 3 * (PIX_W + 8) + 8 + 1;  // 81, signed
  localparam int unsigned A4_W   = 4 * (PIX_W + 8) + 8;      // 104

  // formats of the result words; STD_FRAC is for users of the results only:
  // 8 fraction bits follow from taking the root of a2/255, not a free choice
  localparam int unsigned STAT_W   = 32;
  localparam int unsigned STD_FRAC = 8;
  localparam int unsigned SKW_FRAC = 16;
  localparam int unsigned KRT_FRAC = 16;

  typedef logic [PIX_W-1:0]              pix_t;
  typedef logic [BLK-1:0][PIX_W-1:0]     row_t;   // one block row, element 0 = leftmost

  // Block descriptor carried by the index channel: which block, and whether
  // it lies inside the image (blocks past the edge produce zero results).
  typedef struct packed {
    logic             in_range;
    logic [IDX_W-1:0] ix;     // block row index (i = 4*ix)
    logic [IDX_W-1:0] iy;     // block column index (j = 4*iy)
  } blk_hdr_t;

  typedef struct packed {
    logic        [A2_W-1:0] a2;
    logic signed [A3_W-1:0] a3;
    logic        [A4_W-1:0] a4;
  } moments_t;

  typedef struct packed {
    logic        [STAT_W-1:0] std_v;
    logic signed [STAT_W-1:0] skw;
    logic        [STAT_W-1:0] krt;
  } stats_t;

endpackage
