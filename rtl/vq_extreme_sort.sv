// vq_extreme_sort: the four smallest and four largest block sums of a frame.
//
// Two sorted lists of four registers. Each new block sum is compared with all
// four entries of a list at once; it is inserted in front of the first entry
// it beats and the entries behind it move down one place, the last falling
// off. Comparisons are strict, so a sum equal to an entry goes behind it.
// min_sum[0] is the smallest sum seen, max_sum[0] the largest.
//
// The four-entry lists, strict comparisons and start values follow the
// original design; the one-cycle parallel insertion is this design's choice.
//
// Interface: in_sum is taken when in_valid is high; both lists are updated one
// cycle later. clear starts a new frame: the largest-sum list goes to 0 and the
// smallest-sum list to 16384, above any possible block sum.
module vq_extreme_sort
  import vq_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  in_valid,
  input  bsum_t in_sum,
  output bsum_t min_sum [N],
  output bsum_t max_sum [N]
);
  logic [N-1:0] lt, gt;   // new sum beats entry i

  always_comb begin
    for (int i = 0; i < N; i++) begin
      lt[i] = in_sum < min_sum[i];
      gt[i] = in_sum > max_sum[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) begin
        min_sum[i] <= BSUM_MIN_INIT;
        max_sum[i] <= '0;
      end
    end else if (clear) begin
      for (int i = 0; i < N; i++) begin
        min_sum[i] <= BSUM_MIN_INIT;
        max_sum[i] <= '0;
      end
    end else if (in_valid) begin
      // Entry i takes the new sum if it beats entry i but not entry i-1, and
      // takes the old entry i-1 if the new sum beats that one.
      if (lt[0]) min_sum[0] <= in_sum;
      if (gt[0]) max_sum[0] <= in_sum;
      for (int i = 1; i < N; i++) begin
        if (lt[i-1])    min_sum[i] <= min_sum[i-1];
        else if (lt[i]) min_sum[i] <= in_sum;
        if (gt[i-1])    max_sum[i] <= max_sum[i-1];
        else if (gt[i]) max_sum[i] <= in_sum;
      end
    end
  end

  // Both lists stay sorted.
  for (genvar i = 1; i < N; i++) begin : g_chk
    a_sorted : assert property (@(posedge clk) disable iff (!rst_n)
                                min_sum[i-1] <= min_sum[i] && max_sum[i-1] >= max_sum[i])
      else $error("extreme lists out of order");
  end
endmodule
