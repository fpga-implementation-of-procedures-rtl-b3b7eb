// tb_vq_block_sum: self-checking test of the block luminance sum.
//
// Feeds random, all-zero and all-255 blocks as four microblocks each, with
// idle cycles between some microblocks, and checks that bsum_valid pulses
// exactly once per block, one cycle after its fourth microblock, with the sum
// of its 64 pixels. A clear in the middle of a block must discard the partial
// sum.
module tb_vq_block_sum;
  import vq_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, mb_valid = 0;
  logic [1:0] mb_idx = 0;
  microblock_t mb = '0;
  logic bsum_valid;
  bsum_t bsum;
  int checks = 0, failures = 0;

  vq_block_sum dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_block(int mode, bit gaps);
    int unsigned total = 0;
    for (int m = 0; m < 4; m++) begin
      @(negedge clk);
      if (gaps && $urandom_range(0, 1)) begin
        mb_valid = 0;
        @(negedge clk);
        checks++;
        if (bsum_valid) begin failures++; $display("FAIL spurious valid"); end
      end
      mb_valid = 1;
      mb_idx = 2'(m);
      for (int k = 0; k < 16; k++) begin
        mb[k] = (mode == 0) ? 8'($urandom) : (mode == 1) ? 8'd0 : 8'd255;
        total += mb[k];
      end
    end
    @(negedge clk);
    mb_valid = 0;
    checks++;
    if (!bsum_valid || bsum !== 16'(total)) begin
      failures++;
      $display("FAIL bsum %0d expected %0d valid %b", bsum, total, bsum_valid);
    end
    @(negedge clk);
    checks++;
    if (bsum_valid) begin failures++; $display("FAIL valid longer than a cycle"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    send_block(2, 0);
    send_block(1, 0);
    for (int i = 0; i < 300; i++) send_block(0, i % 3 == 0);
    // a block broken off by clear
    for (int m = 0; m < 2; m++) begin
      @(negedge clk); mb_valid = 1; mb_idx = 2'(m); mb = '1;
    end
    @(negedge clk); mb_valid = 0; clear = 1;
    @(negedge clk); clear = 0;
    // next block's microblocks 1..3 only, after clear: sum must hold only them
    begin
      automatic int unsigned t = 0;
      for (int m = 1; m < 4; m++) begin
        @(negedge clk); mb_valid = 1; mb_idx = 2'(m);
        for (int k = 0; k < 16; k++) begin mb[k] = 8'($urandom); t += mb[k]; end
      end
      @(negedge clk); mb_valid = 0;
      checks++;
      if (!bsum_valid || bsum !== 16'(t)) begin failures++; $display("FAIL clear %0d %0d", bsum, t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
