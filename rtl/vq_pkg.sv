// vq_pkg: types and constants shared by the video-quality assessment channel.
//
// A frame reaches the hardware as a resolution header followed by 128-bit
// words, one 4x4 microblock of 8-bit grey-scale pixels per word. Four
// consecutive microblocks form one 8x8 block (top-left, top-right,
// bottom-left, bottom-right) and blocks arrive in raster order. Inside a
// microblock the pixels are numbered column by column: p1..p4 are the first
// column top to bottom, p5..p8 the second, and so on up to p16.
//
// Following the stream structure of the design, the result of one frame is a
// single 128-bit word (vq_result_t): blackout flag in bit 127, exposure byte in
// bits 103:96, interlaced-microblock count in 95:64, InterSum in 63:32 and
// IntraSum in 31:0.
//
// This design's own choices: pixel p(k) sits in bits 8k-1:8k-8 of the word,
// and the header carries the frame width in bits 15:0 and the height in
// bits 31:16.
package vq_pkg;

  localparam int unsigned STREAM_W     = 128;  // width of both streams
  localparam int unsigned PIX_W        = 8;    // grey-scale pixel
  localparam int unsigned MB_PIX       = 16;   // pixels in a 4x4 microblock
  localparam int unsigned SUM_W        = 32;   // frame accumulators
  localparam int unsigned BSUM_W       = 16;   // block luminance sum
  localparam int unsigned DIM_W        = 16;   // width or height in the header

  // Blackout threshold on the block-sum spread.
  localparam logic [BSUM_W-1:0] TH_BLOUT = 16'd4;
  // Starting value of the "smallest block sum" registers; above any real
  // block sum (64 * 255 = 16320).
  localparam logic [BSUM_W-1:0] BSUM_MIN_INIT = 16'd16384;

  // Cycles between the last microblock being accepted and the result being
  // stable in the metric units (input register, accumulate, sort).
  localparam int unsigned PIPE_DEPTH = 3;

  typedef logic [PIX_W-1:0]  pixel_t;
  typedef pixel_t [MB_PIX-1:0] microblock_t;   // index k-1 holds p(k)
  typedef logic [BSUM_W-1:0] bsum_t;
  typedef logic [SUM_W-1:0]  sum_t;

  typedef struct packed {
    logic [STREAM_W-2*DIM_W-1:0] unused;
    logic [DIM_W-1:0]            height;
    logic [DIM_W-1:0]            width;
  } vq_header_t;

  typedef struct packed {
    logic        blackout;
    logic [22:0] unused;
    logic [7:0]  exposure;
    sum_t        interlace;
    sum_t        inter_sum;
    sum_t        intra_sum;
  } vq_result_t;

  // Pixel at (row, col) of a microblock, both 0..3, column-major numbering.
  function automatic pixel_t mb_pix(microblock_t mb, int unsigned row, int unsigned col);
    return mb[col*4 + row];
  endfunction

  function automatic logic [PIX_W-1:0] absdiff(pixel_t a, pixel_t b);
    return (a > b) ? a - b : b - a;
  endfunction

endpackage
