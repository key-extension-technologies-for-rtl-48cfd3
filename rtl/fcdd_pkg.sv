// fcdd_pkg: types and constants shared by the fast CU depth decision (FCDD)
// pre-processor.
//
// The FCDD block looks at one 64x64 coding tree unit (CTU) of 8-bit luma
// pixels and, for every coding unit (CU) from 8x8 to 64x64, compares the mean
// of the two pixel columns on either side of the CU's vertical centre line
// and the mean of the two pixel rows on either side of its horizontal centre
// line. A large difference marks the CU for a split. The CTU size, the four CU
// levels (8x8 .. 64x64) and the two-pixel memory word follow the published
// architecture; the 8-bit pixel depth and the field layouts below are this
// design's own choices.
package fcdd_pkg;

  localparam int CTU_SIZE   = 64;                 // CTU edge in pixels
  localparam int CTU_LOG2   = 6;
  localparam int PIX_W      = 8;                  // bits per luma pixel
  localparam int WORD_PIX   = 2;                  // pixels per CTU memory read word
  localparam int NUM_LEVELS = 4;                  // CU sizes 8, 16, 32, 64
  localparam int MIN_LOG2   = 3;                  // log2 of the smallest CU examined
  localparam int SUM_W      = PIX_W + CTU_LOG2;   // a sum of up to 64 pixels
  localparam int TH_W       = PIX_W;              // threshold / correlation width
  localparam int NUM_BLK8   = (CTU_SIZE / 8) * (CTU_SIZE / 8);

  typedef logic [PIX_W-1:0] pixel_t;
  typedef logic [TH_W-1:0]  th_t;
  typedef logic [SUM_W-1:0] sum_t;

  // Pixel address inside the CTU. A read at (y, x) returns pixels x and x+1
  // of row y as one two-pixel word.
  typedef struct packed {
    logic [CTU_LOG2-1:0] y;
    logic [CTU_LOG2-1:0] x;
  } pix_addr_t;

  // Side information travelling with each pair of read words through the
  // boundary calculation pipeline.
  typedef struct packed {
    logic [1:0] level;    // 0: 8x8, 1: 16x16, 2: 32x32, 3: 64x64
    logic [5:0] cu_idx;   // m * (8 >> level) + k, raster order inside the CTU
    logic       first;    // first read of this CU
    logic       last;     // last read of this CU
    logic       h_lower;  // horizontal path is reading the lower centre row
  } bc_tag_t;

  // One split flag per CU and level: set when the boundary correlation of the
  // CU reaches the threshold (the CU is better coded as four smaller CUs).
  typedef struct packed {
    logic        s64;
    logic [3:0]  s32;
    logic [15:0] s16;
    logic [63:0] s8;
  } split_flags_t;

  // Final CU size per 8x8 block, as log2 of the edge (2 = 4x4 .. 6 = 64x64).
  typedef logic [2:0] cu_log2_t;

endpackage
