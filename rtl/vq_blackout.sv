// vq_blackout: blackout (uniform frame) detection.
//
// A frame lost in transmission or badly recorded shows one flat colour, black
// or any other. Instead of comparing every pixel, the unit reuses the block
// sums of the exposure metric: if the brightest block's sum exceeds the
// darkest block's sum by more than TH_BLOUT (4) the frame is not blank,
// otherwise it is. It is one subtractor and one comparator.
//
// The threshold of 4 and the strict "greater than" follow the original
// hardware formulation.
//
// Interface: purely combinational; max_sum and min_sum are the largest and
// smallest block sums of the frame, blackout is 1 for a uniform frame.
module vq_blackout
  import vq_pkg::*;
(
  input  bsum_t max_sum,
  input  bsum_t min_sum,
  output logic  blackout
);
  bsum_t spread;

  // Before any block of a frame has been seen, max_sum is 0 and min_sum is
  // 16384: the difference wraps to a large value and the frame reads as not
  // blank.
  assign spread   = max_sum - min_sum;
  assign blackout = !(spread > TH_BLOUT);
endmodule
