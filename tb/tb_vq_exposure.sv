// tb_vq_exposure: self-checking test of the exposure computation.
//
// Drives sorted lists of block sums and checks the exposure byte against
// (sum of the eight sums, each >> 2) >> 7, against a few values worked out by
// hand (all blocks black, all white, all mid-grey), and checks that it is
// never more than two below the exact mean luminance (total / 512).
module tb_vq_exposure;
  import vq_pkg::*;
  bsum_t min_sum [4];
  bsum_t max_sum [4];
  logic [7:0] exposure;
  int checks = 0, failures = 0;

  vq_exposure #(.N(4)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int unsigned expv);
    #1;
    checks++;
    if (exposure !== 8'(expv)) begin
      failures++;
      $display("FAIL exposure %0d expected %0d", exposure, expv);
    end
  endtask

  initial begin
    int unsigned v[8];
    int unsigned q, exact;
    foreach (min_sum[i]) begin min_sum[i] = 0; max_sum[i] = 0; end
    check(0);
    foreach (min_sum[i]) begin min_sum[i] = 16320; max_sum[i] = 16320; end
    check(255);       // 8 x (16320 >> 2) = 32640, >> 7 = 255
    foreach (min_sum[i]) begin min_sum[i] = 128 * 64; max_sum[i] = 128 * 64; end
    check(128);
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < 8; i++) v[i] = $urandom_range(0, 16320);
      v.sort();
      q = 0; exact = 0;
      for (int i = 0; i < 4; i++) begin
        min_sum[i] = 16'(v[i]);
        max_sum[i] = 16'(v[7 - i]);
      end
      for (int i = 0; i < 8; i++) begin q += v[i] / 4; exact += v[i]; end
      check(q / 128);
      checks++;
      if (int'(exposure) > exact / 512 || int'(exposure) + 2 < exact / 512) begin
        failures++;
        $display("FAIL exposure %0d far from mean %0d", exposure, exact / 512);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
