// tb_vq_stream_fifo: self-checking test of the stream FIFO.
//
// Random valid on the write side and random ready on the read side, in three
// phases (reader slow, balanced, writer slow). Every word read is compared
// with a scoreboard queue; the level output is compared with the queue size.
// The test requires the FIFO to have been seen full, with writes refused, and
// empty.
module tb_vq_stream_fifo;
  localparam int W = 128, DEPTH = 16;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [W-1:0] in_data = '0, out_data;
  logic [$clog2(DEPTH+1)-1:0] level;
  int checks = 0, failures = 0, full_seen = 0, empty_seen = 0;
  logic [W-1:0] sb[$];
  int wr_pct, rd_pct;

  vq_stream_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (level != sb.size()) begin failures++; $display("FAIL level %0d/%0d", level, sb.size()); end
    if (out_valid && out_ready) begin
      checks++;
      if (sb.size() == 0 || out_data !== sb[0]) begin failures++; $display("FAIL data"); end
      if (sb.size() > 0) void'(sb.pop_front());
    end
    if (in_valid && in_ready) sb.push_back(in_data);
    if (level == DEPTH && in_valid && !in_ready) full_seen++;
    if (level == 0 && !out_valid) empty_seen++;
  end

  always @(negedge clk) begin
    in_valid  = ($urandom_range(0, 99) < wr_pct);
    in_data   = {$urandom, $urandom, $urandom, $urandom};
    out_ready = ($urandom_range(0, 99) < rd_pct);
  end

  initial begin
    wr_pct = 0; rd_pct = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wr_pct = 90; rd_pct = 30; repeat (2000) @(posedge clk);
    wr_pct = 60; rd_pct = 60; repeat (2000) @(posedge clk);
    wr_pct = 20; rd_pct = 90; repeat (2000) @(posedge clk);
    checks++;
    if (full_seen == 0 || empty_seen == 0) begin
      failures++; $display("FAIL full %0d empty %0d", full_seen, empty_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
