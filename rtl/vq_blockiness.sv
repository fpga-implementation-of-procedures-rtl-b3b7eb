// vq_blockiness: IntraSum and InterSum accumulators of the blockiness metric.
//
// The blockiness of a frame is the ratio of IntraSum (absolute differences
// between neighbouring pixels inside a block, next to its border) to InterSum
// (absolute differences across the border into the next block). The ratio is
// taken by the consumer; this unit only produces the two sums.
//
// Producing both sums from one block needs pixels of the right and lower
// neighbours. The sender therefore drops the first row and column of the
// picture, so each 8x8 block it sends is shifted by one pixel: its last column
// and last row belong to the neighbouring blocks, and the block border lies
// between columns 6 and 7 and between rows 6 and 7 (counting 0..7). Every
// term is then found in a single block:
//
//   microblock 1 (top-left)     no terms
//   microblock 2 (top-right)    rows 0-3, border between local columns 2|3:
//                                 intra |p(r,2)-p(r,1)|, inter |p(r,2)-p(r,3)|
//   microblock 3 (bottom-left)  columns 0-3, border between local rows 2|3:
//                                 intra |p(1,c)-p(2,c)|, inter |p(3,c)-p(2,c)|
//   microblock 4 (bottom-right) intra |p(0,2)-p(0,1)| |p(3,1)-p(3,2)|
//                                     |p(1,0)-p(2,0)| |p(1,3)-p(2,3)|
//                               inter |p(0,2)-p(0,3)| |p(3,2)-p(3,3)|
//                                     |p(3,0)-p(2,0)| |p(2,3)-p(3,3)|
//
// p(r,c) is the pixel at local row r, column c of the microblock. That gives
// twelve terms per sum per block, the pixel selection of the hardware the
// design is built from.
//
// Interface: a microblock is taken when mb_valid is high, with mb_idx its
// position in the block (0..3). The four terms are added in the same cycle and
// the sums are registered, so they are up to date one cycle after the last
// microblock. clear (the end of a frame) sets both sums to zero and wins over
// mb_valid.
module vq_blockiness
  import vq_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        mb_valid,
  input  logic [1:0]  mb_idx,
  input  microblock_t mb,
  output sum_t        intra_sum,
  output sum_t        inter_sum
);
  logic [PIX_W+1:0] intra_add, inter_add;  // sum of four differences

  always_comb begin
    intra_add = '0;
    inter_add = '0;
    unique case (mb_idx)
      2'd1: for (int r = 0; r < 4; r++) begin
        intra_add += (PIX_W+2)'(absdiff(mb_pix(mb, r, 2), mb_pix(mb, r, 1)));
        inter_add += (PIX_W+2)'(absdiff(mb_pix(mb, r, 2), mb_pix(mb, r, 3)));
      end
      2'd2: for (int c = 0; c < 4; c++) begin
        intra_add += (PIX_W+2)'(absdiff(mb_pix(mb, 1, c), mb_pix(mb, 2, c)));
        inter_add += (PIX_W+2)'(absdiff(mb_pix(mb, 3, c), mb_pix(mb, 2, c)));
      end
      2'd3: begin
        intra_add = (PIX_W+2)'(absdiff(mb_pix(mb, 0, 2), mb_pix(mb, 0, 1)))
                  + (PIX_W+2)'(absdiff(mb_pix(mb, 3, 1), mb_pix(mb, 3, 2)))
                  + (PIX_W+2)'(absdiff(mb_pix(mb, 1, 0), mb_pix(mb, 2, 0)))
                  + (PIX_W+2)'(absdiff(mb_pix(mb, 1, 3), mb_pix(mb, 2, 3)));
        inter_add = (PIX_W+2)'(absdiff(mb_pix(mb, 0, 2), mb_pix(mb, 0, 3)))
                  + (PIX_W+2)'(absdiff(mb_pix(mb, 3, 2), mb_pix(mb, 3, 3)))
                  + (PIX_W+2)'(absdiff(mb_pix(mb, 3, 0), mb_pix(mb, 2, 0)))
                  + (PIX_W+2)'(absdiff(mb_pix(mb, 2, 3), mb_pix(mb, 3, 3)));
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      intra_sum <= '0;
      inter_sum <= '0;
    end else if (clear) begin
      intra_sum <= '0;
      inter_sum <= '0;
    end else if (mb_valid) begin
      intra_sum <= intra_sum + SUM_W'(intra_add);
      inter_sum <= inter_sum + SUM_W'(inter_add);
    end
  end
endmodule
