// tb_vq_blackout: self-checking test of the blackout decision.
//
// Sweeps the spread between the largest and smallest block sum around the
// threshold of 4 at several brightness levels: spreads 0..4 must give
// blackout = 1, spreads of 5 and more blackout = 0. Also checks the state
// before any block is seen (largest 0, smallest 16384), which is not blank.
module tb_vq_blackout;
  import vq_pkg::*;
  bsum_t max_sum, min_sum;
  logic blackout;
  int checks = 0, failures = 0;

  vq_blackout dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int unsigned mx, int unsigned mn, bit expv);
    max_sum = 16'(mx);
    min_sum = 16'(mn);
    #1;
    checks++;
    if (blackout !== expv) begin
      failures++;
      $display("FAIL max %0d min %0d blackout %b expected %b", mx, mn, blackout, expv);
    end
  endtask

  initial begin
    int unsigned base[4] = '{0, 5000, 8192, 16300};
    foreach (base[b])
      for (int unsigned s = 0; s <= 20 && base[b] + s <= 16320; s++)
        check(base[b] + s, base[b], s <= 4);
    check(16320, 0, 0);
    check(0, 16384, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
