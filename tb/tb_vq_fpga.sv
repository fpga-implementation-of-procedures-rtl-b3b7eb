// tb_vq_fpga: end-to-end test of one video-quality channel.
//
// Streams whole frames of every test pattern (random, flat, interlaced, blocky,
// dark, bright, mixed) and compares each result word with the reference model
// of vq_tb_pkg, which computes the metrics from frame coordinates. With the
// source always valid and the sink always ready it also checks the rate, one
// microblock per clock (the header plus n microblocks take n+1 cycles), and
// the latency of PIPE_DEPTH cycles from the last microblock to out_valid.
// The last frames run with random gaps on both streams.
module tb_vq_fpga;
  import vq_pkg::*;
  import vq_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic busy, mb_hit_interlace;
  int checks = 0, failures = 0;
  int unsigned cyc = 0, t_first = 0, t_last = 0, t_out = 0;
  bit src_gaps = 0, sink_gaps = 0;
  vq_result_t exp_q[$];

  vq_stream_if #(.W(STREAM_W)) in_s  (.clk, .rst_n);
  vq_stream_if #(.W(STREAM_W)) out_s (.clk, .rst_n);

  vq_fpga dut (.clk, .rst_n, .in_s, .out_s, .busy, .mb_hit_interlace);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sink: compare result words
  always @(negedge clk) out_s.ready = !sink_gaps || ($urandom_range(0, 2) != 0);
  always @(posedge clk) if (rst_n && out_s.valid && out_s.ready) begin
    vq_result_t got, e;
    got = vq_result_t'(out_s.data);
    t_out = cyc;
    checks++;
    if (exp_q.size() == 0) begin
      failures++; $display("FAIL unexpected result");
    end else begin
      e = exp_q.pop_front();
      if (got !== e) begin
        failures++;
        $display("FAIL result: blk %0d exp %0d ilace %0d intra %0d inter %0d / expected %0d %0d %0d %0d %0d",
                 got.blackout, got.exposure, got.interlace, got.intra_sum, got.inter_sum,
                 e.blackout, e.exposure, e.interlace, e.intra_sum, e.inter_sum);
      end
    end
  end

  task automatic put(logic [STREAM_W-1:0] w, output int unsigned t);
    @(negedge clk);
    while (src_gaps && $urandom_range(0, 3) == 0) begin in_s.valid = 0; @(negedge clk); end
    in_s.valid = 1;
    in_s.data  = w;
    @(posedge clk);
    while (!in_s.ready) @(posedge clk);
    t = cyc;
    @(negedge clk);
    in_s.valid = 0;
  endtask

  // Send the words back to back when no gaps are wanted.
  task automatic frame(pattern_t p, int unsigned seed, int unsigned w, int unsigned h, bit timing);
    int unsigned n = w * h / 16, t;
    exp_q.push_back(ref_frame(p, seed, w, h));
    put(header_word(w, h), t_first);
    for (int unsigned b = 0; b < n / 4; b++)
      for (int unsigned m = 0; m < 4; m++) begin
        if (!src_gaps) begin
          // keep valid high: drive the next word right after the edge
          in_s.valid = 1;
          in_s.data  = mb_word(p, seed, w, b, m);
          @(posedge clk);
          while (!in_s.ready) @(posedge clk);
          t_last = cyc;
          #1;
        end else begin
          put(mb_word(p, seed, w, b, m), t);
          t_last = t;
        end
      end
    in_s.valid = 0;
    if (timing) begin
      checks++;
      if (t_last - t_first != n) begin
        failures++; $display("FAIL rate: %0d microblocks in %0d cycles", n, t_last - t_first);
      end
      while (exp_q.size() != 0) @(posedge clk);
      checks++;
      // out_valid rises PIPE_DEPTH edges after the last microblock is taken;
      // the result word is taken by the sink on the next edge.
      if (t_out - t_last != PIPE_DEPTH + 1) begin
        failures++; $display("FAIL latency %0d", t_out - t_last);
      end
    end
  endtask

  initial begin
    in_s.valid = 0;
    in_s.data  = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    frame(P_RANDOM,     1, 32, 32, 1);
    frame(P_FLAT,      90, 16, 16, 1);
    frame(P_INTERLACED, 2, 64, 32, 1);
    frame(P_BLOCKY,     3, 48, 40, 1);
    frame(P_DARK,       4, 32, 16, 1);
    frame(P_BRIGHT,     5, 32, 16, 1);
    frame(P_MIXED,      6, 128, 64, 1);
    frame(P_FLAT,       0, 640, 480, 1);
    src_gaps = 1; sink_gaps = 1;
    frame(P_RANDOM,     7, 64, 64, 0);
    frame(P_FLAT,     255, 16, 8, 0);
    frame(P_MIXED,      8, 96, 32, 0);
    while (exp_q.size() != 0) @(posedge clk);
    repeat (5) @(posedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL still busy"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
