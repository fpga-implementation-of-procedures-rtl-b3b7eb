// vq_block_sum: luminance sum of each 8x8 block.
//
// The exposure and blackout metrics work on per-block luminance. Because all
// blocks have 64 pixels, the sum is used in place of the mean, so no division
// is needed. The unit adds the 16 pixels of each incoming microblock and keeps
// a running sum over the four microblocks of a block.
//
// Summing instead of averaging follows the original design; adding a whole
// microblock in one cycle is this design's choice.
//
// Interface: a microblock is taken when mb_valid is high; mb_idx gives its
// position in the block (0 starts a new block, 3 ends it). With the fourth
// microblock the finished block sum appears on bsum one cycle later, with
// bsum_valid high for that one cycle. clear empties the running sum. The sum
// of 64 8-bit pixels is at most 16320 and fits the 16-bit bsum_t.
module vq_block_sum
  import vq_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        mb_valid,
  input  logic [1:0]  mb_idx,
  input  microblock_t mb,
  output logic        bsum_valid,
  output bsum_t       bsum
);
  bsum_t mb_total;   // 16 pixels of this microblock
  bsum_t partial;    // microblocks 0..2 of the current block

  always_comb begin
    mb_total = '0;
    for (int k = 0; k < MB_PIX; k++) mb_total += BSUM_W'(mb[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      partial    <= '0;
      bsum       <= '0;
      bsum_valid <= 1'b0;
    end else begin
      bsum_valid <= 1'b0;
      if (clear) begin
        partial <= '0;
      end else if (mb_valid) begin
        if (mb_idx == 2'd3) begin
          bsum       <= partial + mb_total;
          bsum_valid <= 1'b1;
          partial    <= '0;
        end else if (mb_idx == 2'd0) begin
          partial <= mb_total;
        end else begin
          partial <= partial + mb_total;
        end
      end
    end
  end
endmodule
