// tb_vq_interlace: self-checking test of the interlace detector and counter.
//
// Microblocks of five kinds are fed: random, rows 1/3 bright over 2/4 dark,
// the reverse, the pattern broken in one pixel pair, and flat. The expected
// detection is worked out from a row/column array: all four columns must
// alternate, in the same direction. The count is checked after every
// microblock and after clear.
module tb_vq_interlace;
  import vq_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, mb_valid = 0;
  microblock_t mb = '0;
  logic hit;
  sum_t count;
  int checks = 0, failures = 0;
  int unsigned expected = 0, hits = 0;

  vq_interlace dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(int kind);
    int unsigned a [4][4];   // [row][col]
    bit up = 1, dn = 1;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        case (kind)
          0: a[r][c] = $urandom_range(0, 255);
          1: a[r][c] = (r % 2 == 0) ? $urandom_range(100, 255) : $urandom_range(0, 99);
          2: a[r][c] = (r % 2 == 1) ? $urandom_range(100, 255) : $urandom_range(0, 99);
          3: a[r][c] = (r % 2 == 0) ? 200 : 50;
          default: a[r][c] = 90;
        endcase
    if (kind == 3) a[$urandom_range(0, 3)][$urandom_range(0, 3)] = 120;  // one bad pixel
    for (int c = 0; c < 4; c++) begin
      up &= a[0][c] > a[1][c] && a[1][c] < a[2][c] && a[2][c] > a[3][c];
      dn &= a[0][c] < a[1][c] && a[1][c] > a[2][c] && a[2][c] < a[3][c];
    end
    @(negedge clk);
    mb_valid = 1;
    for (int k = 0; k < 16; k++) mb[k] = 8'(a[k % 4][k / 4]);
    #1;
    checks++;
    if (hit !== (up || dn)) begin failures++; $display("FAIL hit %b kind %0d", hit, kind); end
    if (up || dn) begin expected++; hits++; end
    @(negedge clk);
    mb_valid = 0;
    checks++;
    if (count !== expected) begin failures++; $display("FAIL count %0d/%0d", count, expected); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) send($urandom_range(0, 4));
    @(negedge clk); clear = 1; mb_valid = 1;   // clear wins
    @(negedge clk); clear = 0; mb_valid = 0;
    expected = 0;
    checks++;
    if (count !== 0) begin failures++; $display("FAIL clear"); end
    for (int i = 0; i < 100; i++) send($urandom_range(1, 2));
    checks++;
    if (hits < 100) begin failures++; $display("FAIL too few interlaced microblocks"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
