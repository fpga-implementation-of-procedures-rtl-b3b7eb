// vq_exposure: exposure metric from the extreme block sums.
//
// A frame that is too dark or too bright shows in the mean luminance of its
// darkest and brightest blocks. The unit averages the eight extreme blocks,
// the four darkest and the four brightest, over all their pixels:
// 8 blocks x 64 pixels = 512 = 2^9, so the mean is the total shifted right by
// nine bits. To keep the total within 16 bits each block sum is shifted right
// by two bits before the addition and the total by the remaining seven after
// it; the dropped fractions are of no consequence. The result is a byte.
//
// The eight extreme blocks and the 2 + 7 bit shifts follow the original
// design.
//
// Interface: purely combinational, from the sorted lists of vq_extreme_sort to
// the exposure byte.
module vq_exposure
  import vq_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  bsum_t      min_sum [N],
  input  bsum_t      max_sum [N],
  output logic [7:0] exposure
);
  logic [BSUM_W-1:0] total;   // sum of the eight quarter-block sums

  always_comb begin
    total = '0;
    for (int i = 0; i < N; i++) begin
      total += BSUM_W'(min_sum[i] >> 2);
      total += BSUM_W'(max_sum[i] >> 2);
    end
    exposure = 8'(total >> 7);
  end
endmodule
