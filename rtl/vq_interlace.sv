// vq_interlace: interlace distortion detection and count.
//
// When the two half-frames of an interlaced picture are misaligned, rows
// alternate: each row differs from the next in the opposite direction to the
// row before. A 4x4 microblock is counted as interlaced when, in all four
// columns, row 1 is brighter than row 2, row 2 darker than row 3 and row 3
// brighter than row 4, or when all twelve comparisons go the other way. That
// is twelve strict comparisons combined into one detection per pattern.
// The frame metric, the share of interlaced microblocks, is taken by the
// consumer from the count given here.
//
// The rule (row pairs 1-2 and 3-4 change one way, 2-3 the other, in every
// column) follows the original design; reading it as two strict patterns is
// this design's interpretation.
//
// Interface: a microblock is taken when mb_valid is high; hit shows the
// detection for the current mb combinationally, and count is the registered
// number of interlaced microblocks so far in the frame. clear sets it to 0.
module vq_interlace
  import vq_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        mb_valid,
  input  microblock_t mb,
  output logic        hit,
  output sum_t        count
);
  logic odd_bright, even_bright;   // rows 1,3 above rows 2,4 / the reverse

  always_comb begin
    odd_bright  = 1'b1;
    even_bright = 1'b1;
    for (int c = 0; c < 4; c++) begin
      odd_bright  &= (mb_pix(mb, 0, c) > mb_pix(mb, 1, c)) &&
                     (mb_pix(mb, 1, c) < mb_pix(mb, 2, c)) &&
                     (mb_pix(mb, 2, c) > mb_pix(mb, 3, c));
      even_bright &= (mb_pix(mb, 0, c) < mb_pix(mb, 1, c)) &&
                     (mb_pix(mb, 1, c) > mb_pix(mb, 2, c)) &&
                     (mb_pix(mb, 2, c) < mb_pix(mb, 3, c));
    end
    hit = odd_bright || even_bright;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                count <= '0;
    else if (clear)            count <= '0;
    else if (mb_valid && hit)  count <= count + 1'b1;
  end
endmodule
