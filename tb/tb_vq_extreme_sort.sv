// tb_vq_extreme_sort: self-checking test of the four-smallest/four-largest lists.
//
// Streams of random block sums (wide range, and a narrow range that makes many
// ties) are fed with random gaps. After every input the lists are compared
// with a reference that keeps all values seen in the frame, fully sorted.
// clear must bring the lists back to 16384 and 0.
module tb_vq_extreme_sort;
  import vq_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  bsum_t in_sum = '0;
  bsum_t min_sum [4];
  bsum_t max_sum [4];
  int checks = 0, failures = 0;
  int unsigned seen[$];

  vq_extreme_sort #(.N(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    int unsigned s[$];
    int unsigned e_lo, e_hi;
    s = seen;
    s.sort();
    for (int i = 0; i < 4; i++) begin
      e_lo = (i < s.size()) ? s[i] : 16384;
      e_hi = (i < s.size()) ? s[s.size() - 1 - i] : 0;
      checks++;
      if (min_sum[i] !== 16'(e_lo) || max_sum[i] !== 16'(e_hi)) begin
        failures++;
        $display("FAIL entry %0d: min %0d/%0d max %0d/%0d", i, min_sum[i], e_lo, max_sum[i], e_hi);
      end
    end
  endtask

  task automatic frame(int n, int lo, int hi);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      in_valid = 1;
      in_sum = 16'($urandom_range(lo, hi));
      seen.push_back(in_sum);
      @(negedge clk);
      in_valid = 0;
      in_sum = 16'($urandom);   // not taken
      compare();
    end
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    seen.delete();
    compare();
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    compare();
    frame(3, 0, 16320);
    frame(200, 0, 16320);
    frame(200, 1000, 1010);
    frame(100, 16000, 16320);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
