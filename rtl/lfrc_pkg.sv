// lfrc_pkg: shared constants, types and index functions of the variable-compression-ratio
// lossless frame recompression (VCR-LFRC) datapath.
//
// A partition is an 8x4 luma block plus the two co-located 4x2 chroma blocks (4:2:0), 48
// samples or 384 bits uncompressed. Uncompressed sample i sits at bits [8*i +: 8]: luma 0..31
// in raster order (8 wide), Cb 32..39 and Cr 40..47 (4 wide each).
//
// For coding, the 48 samples are viewed as three 4x4 units (luma left half, luma right half,
// Cb over Cr), each split into four 2x2 sub-blocks; residual n = 16*unit + 4*sub + j, with j the
// raster position inside the 2x2 sub-block. The unit/sub-block view, the DPCM prediction
// directions, the 3-bit mode field and the bit order of the compressed partition are this
// design's own choices; the partition, 2x2 sub-blocks, F/M/D/T fields and the trailing-bit rule
// follow the published scheme.
//
// Compressed partition, bit 0 first:  F (3 x 8 bits: Y, Cb, Cr start samples)
//   | M (12 x 3 bits, sub-block order) | D (per residual, width by mode, F positions skipped)
//   | T (one bit per sub-block that holds a residual of magnitude 2^(M-1)).
// Mode M: 0 = all residuals zero (no D bits); 1..6 = M-bit two's complement, where the code
// 100..0 stands for +/-2^(M-1) with the sign in the sub-block's T bit (1 = positive);
// 7 = 9-bit two's complement, no T.
package lfrc_pkg;

  localparam int unsigned PART_BITS  = 384;  // uncompressed partition
  localparam int unsigned NSAMP      = 48;
  localparam int unsigned NSUB       = 12;   // 2x2 sub-blocks per partition
  localparam int unsigned FM_BITS    = 60;   // 24 F bits + 36 M bits
  localparam int unsigned STREAM_W   = 512;  // >= 60 + 45*9 = 465 worst-case coded bits
  localparam int unsigned LEN_W      = 9;    // partition length 0..384 bits
  localparam int unsigned WORD_W     = 128;  // DRAM bus word
  localparam int unsigned GROUP_WORDS = 12;  // 4 partitions x 384 bits / 128

  typedef logic [8:0] res_t;   // signed DPCM residual, -255..255

  // Uncompressed sample index of residual position n (0..47).
  function automatic int unsigned samp_idx(input int unsigned n);
    int unsigned u, s, j, lr, lc;
    u = n / 16; s = (n / 4) % 4; j = n % 4;
    lr = (s / 2) * 2 + j / 2;
    lc = (s % 2) * 2 + j % 2;
    if (u == 0)      return lr * 8 + lc;
    else if (u == 1) return lr * 8 + 4 + lc;
    else if (lr < 2) return 32 + lr * 4 + lc;
    else             return 40 + (lr - 2) * 4 + lc;
  endfunction

  // Row, column and plane width of an uncompressed sample index.
  function automatic int unsigned plane_w(input int unsigned i);
    return (i < 32) ? 8 : 4;
  endfunction
  function automatic int unsigned plane_base(input int unsigned i);
    return (i < 32) ? 0 : ((i < 40) ? 32 : 40);
  endfunction

  // DPCM predictor of sample i: left neighbour, or the sample above in column 0.
  // Returns 255 (no predictor) for the top-left sample of a plane, which is sent as F.
  function automatic int unsigned pred_idx(input int unsigned i);
    int unsigned b, w, r, c;
    b = plane_base(i); w = plane_w(i);
    r = (i - b) / w; c = (i - b) % w;
    if (c > 0)      return i - 1;
    else if (r > 0) return i - w;
    else            return 255;
  endfunction

  function automatic bit is_f_pos(input int unsigned n);
    return (n == 0) || (n == 32) || (n == 40);
  endfunction

  // D width of one residual for mode m.
  function automatic int unsigned dwidth(input logic [2:0] m);
    return (m == 3'd7) ? 9 : int'(m);
  endfunction

  // Number of coded residuals in sub-block sb (0..11): 3 where the F sample sits.
  function automatic int unsigned nres(input int unsigned sb);
    return (sb == 0 || sb == 8 || sb == 10) ? 3 : 4;
  endfunction

  // One group's packed length record (32 bits): L0..L2 in bits, L3 as the number of
  // 128-bit words following the word where partition 3 starts, and a flag marking an
  // uncompressed partition 3 (uses one of the three reserved bits).
  typedef struct packed {
    logic [1:0]       rsvd;
    logic             raw3;
    logic [1:0]       l3w;
    logic [LEN_W-1:0] l2;
    logic [LEN_W-1:0] l1;
    logic [LEN_W-1:0] l0;
  } glen_t;

  // A request for one partition of a reference frame, as issued by the MC cache.
  typedef struct packed {
    logic [3:0] frame;  // frame-buffer index
    logic [8:0] gx;     // group column (8 luma pixels wide)
    logic [7:0] gy;     // group row (16 luma lines high, offset 4 lines above the MB grid)
    logic [1:0] part;   // partition within the group, top to bottom
  } preq_t;

endpackage
