// tb_vq_blockiness: self-checking test of the IntraSum/InterSum accumulators.
//
// Random 8x8 blocks (plus flat and maximum-contrast ones) are cut into four
// microblocks and fed one per clock. The expected sums come from the block's
// row/column coordinates: border between columns 6|7 and rows 6|7, terms on
// rows 0-4 and 7 and on columns 0-4 and 7. The sums are checked one cycle
// after each block, and clear is checked to empty them.
module tb_vq_blockiness;
  import vq_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, mb_valid = 0;
  logic [1:0] mb_idx = 0;
  microblock_t mb = '0;
  sum_t intra_sum, inter_sum;
  int checks = 0, failures = 0;
  int unsigned blk [8][8];
  int unsigned exp_intra = 0, exp_inter = 0;

  vq_blockiness dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned ad(int unsigned a, int unsigned b);
    return a > b ? a - b : b - a;
  endfunction

  task automatic send_block(int mode);
    int unsigned rr[6] = '{0, 1, 2, 3, 4, 7};
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++)
        case (mode)
          0: blk[r][c] = $urandom_range(0, 255);
          1: blk[r][c] = 77;
          default: blk[r][c] = ((r + c) % 2) ? 255 : 0;
        endcase
    foreach (rr[i]) begin
      exp_intra += ad(blk[rr[i]][6], blk[rr[i]][5]) + ad(blk[5][rr[i]], blk[6][rr[i]]);
      exp_inter += ad(blk[rr[i]][6], blk[rr[i]][7]) + ad(blk[7][rr[i]], blk[6][rr[i]]);
    end
    for (int m = 0; m < 4; m++) begin
      @(negedge clk);
      mb_valid = 1;
      mb_idx   = 2'(m);
      for (int k = 0; k < 16; k++)
        mb[k] = 8'(blk[(m / 2) * 4 + k % 4][(m % 2) * 4 + k / 4]);
    end
    @(negedge clk);
    mb_valid = 0;
    mb = microblock_t'({$urandom, $urandom, $urandom, $urandom});  // ignored
    checks++;
    if (intra_sum !== exp_intra || inter_sum !== exp_inter) begin
      failures++;
      $display("FAIL intra %0d/%0d inter %0d/%0d", intra_sum, exp_intra, inter_sum, exp_inter);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    send_block(1);
    send_block(2);
    for (int i = 0; i < 200; i++) send_block(0);
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    exp_intra = 0; exp_inter = 0;
    checks++;
    if (intra_sum !== 0 || inter_sum !== 0) begin failures++; $display("FAIL clear"); end
    for (int i = 0; i < 20; i++) send_block(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
