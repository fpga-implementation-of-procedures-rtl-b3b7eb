// vq_fpga: one video-quality assessment channel.
//
// Takes a video frame as a stream of 4x4 microblocks and computes four
// no-reference quality metrics in one pass, at one microblock per clock:
//   blockiness  IntraSum and InterSum around 8x8 block borders (vq_blockiness)
//   exposure    mean luminance of the four darkest and four brightest blocks
//               (vq_block_sum -> vq_extreme_sort -> vq_exposure)
//   blackout    flat frame: brightest and darkest block sums nearly equal
//               (vq_blackout, sharing the exposure path's sorted lists)
//   interlace   number of microblocks with the alternating-row pattern
//               (vq_interlace)
// vq_frame_ctrl reads the resolution header, feeds the microblocks to the
// units, and at the end of the frame sends one 128-bit result word
// (vq_pkg::vq_result_t) and clears the units. The two divisions that finish
// the blockiness and interlace metrics are left to the receiver of the
// result word.
//
// The split into four metric units and the result word layout follow the
// original design; the pipeline registers and their depth are this design's.
//
// Interface: in_s carries header and microblock words, out_s the result words,
// both valid/ready streams. Latency from the last microblock to the result is
// PIPE_DEPTH cycles.
module vq_fpga
  import vq_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  vq_stream_if.sink    in_s,
  vq_stream_if.source  out_s,
  output logic         busy,
  output logic         mb_hit_interlace   // current microblock is interlaced
);
  logic        mb_valid, clear;
  logic [1:0]  mb_idx;
  microblock_t mb;
  vq_result_t  result, out_word;
  logic        bsum_valid;
  bsum_t       bsum;
  bsum_t       min_sum [4];
  bsum_t       max_sum [4];
  logic        ilace_hit;

  vq_frame_ctrl u_ctrl (
    .clk, .rst_n,
    .in_valid (in_s.valid), .in_ready (in_s.ready), .in_data (in_s.data),
    .mb_valid, .mb_idx, .mb, .clear,
    .result,
    .out_valid (out_s.valid), .out_ready (out_s.ready), .out_data (out_word),
    .busy
  );
  assign out_s.data = out_word;

  vq_blockiness u_blockiness (
    .clk, .rst_n, .clear, .mb_valid, .mb_idx, .mb,
    .intra_sum (result.intra_sum), .inter_sum (result.inter_sum)
  );

  vq_block_sum u_block_sum (
    .clk, .rst_n, .clear, .mb_valid, .mb_idx, .mb, .bsum_valid, .bsum
  );

  vq_extreme_sort #(.N(4)) u_sort (
    .clk, .rst_n, .clear, .in_valid (bsum_valid), .in_sum (bsum),
    .min_sum, .max_sum
  );

  vq_exposure #(.N(4)) u_exposure (
    .min_sum, .max_sum, .exposure (result.exposure)
  );

  vq_blackout u_blackout (
    .max_sum (max_sum[0]), .min_sum (min_sum[0]), .blackout (result.blackout)
  );

  vq_interlace u_interlace (
    .clk, .rst_n, .clear, .mb_valid, .mb, .hit (ilace_hit),
    .count (result.interlace)
  );

  assign result.unused    = '0;
  assign mb_hit_interlace = mb_valid && ilace_hit;
endmodule
