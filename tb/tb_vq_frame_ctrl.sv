// tb_vq_frame_ctrl: self-checking test of the frame sequencer.
//
// Sends frames of several resolutions (header, then width*height/16 random
// words) with random gaps. Checks that every microblock word comes out once,
// in order, one cycle after it is taken, with its position in the block; that
// clear pulses once per frame, PIPE_DEPTH-1 cycles after the last microblock
// leaves; that out_valid rises PIPE_DEPTH cycles after the last microblock is
// taken when the output is free; and that the result word is the value of
// the result input in the clear cycle. A consumer that stops taking results
// must stall the next capture without losing a result.
module tb_vq_frame_ctrl;
  import vq_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  logic [STREAM_W-1:0] in_data = '0;
  logic mb_valid, clear, out_valid, out_ready = 1, busy;
  logic [1:0] mb_idx;
  microblock_t mb;
  vq_result_t result, out_data;
  int checks = 0, failures = 0;
  int unsigned cyc = 0, last_take = 0, clear_cnt = 0, stalls = 0;
  logic [STREAM_W-1:0] exp_mb[$];
  int unsigned exp_idx[$];
  vq_result_t exp_res[$];
  bit gaps = 0, frames_done = 0;

  vq_frame_ctrl dut (.*);
  always #5 clk = ~clk;

  // Stand-in for the metric units: a value that changes every cycle.
  assign result = vq_result_t'({4{cyc}});

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (mb_valid) begin
      checks++;
      if (exp_mb.size() == 0 || mb !== microblock_t'(exp_mb[0]) || mb_idx !== 2'(exp_idx[0])) begin
        failures++; $display("FAIL microblock order");
      end
      if (exp_mb.size() > 0) begin void'(exp_mb.pop_front()); void'(exp_idx.pop_front()); end
    end
    if (clear) begin
      clear_cnt++;
      exp_res.push_back(result);
      if (out_valid && !out_ready) begin failures++; $display("FAIL capture over pending result"); end
    end
    if (dut.state == dut.S_DRAIN && dut.drain_done && !clear) stalls++;
    if (out_valid && out_ready) begin
      checks++;
      if (exp_res.size() == 0 || out_data !== exp_res[0]) begin failures++; $display("FAIL result word"); end
      if (exp_res.size() > 0) void'(exp_res.pop_front());
    end
  end

  task automatic send_word(logic [STREAM_W-1:0] w);
    @(negedge clk);
    while (gaps && $urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
    in_valid = 1;
    in_data = w;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    #1 last_take = cyc;   // edge count including the accepting edge
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic frame(int unsigned w, int unsigned h, bit check_latency);
    int unsigned n = w * h / 16;
    logic [STREAM_W-1:0] d;
    send_word({96'd0, 16'(h), 16'(w)});
    for (int unsigned i = 0; i < n; i++) begin
      d = {$urandom, $urandom, $urandom, $urandom};
      exp_mb.push_back(d);
      exp_idx.push_back(i % 4);
      send_word(d);
    end
    if (check_latency) begin
      // both counts are read just after an edge
      while (!out_valid) begin @(posedge clk); #1; end
      checks++;
      if (cyc - last_take != PIPE_DEPTH) begin
        failures++; $display("FAIL latency %0d", cyc - last_take);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    frame(8, 8, 1);
    frame(32, 32, 1);
    gaps = 1;
    frame(16, 24, 0);
    frame(40, 8, 0);
    // consumer stops: the second frame's capture must wait
    while (clear_cnt != 4 || exp_res.size() != 0) @(posedge clk);
    out_ready = 0;
    frame(16, 16, 0);
    frame(16, 16, 0);
    repeat (30) @(posedge clk);
    checks++;
    if (stalls == 0 || !busy) begin failures++; $display("FAIL no capture stall"); end
    out_ready = 1;
    repeat (30) @(posedge clk);
    checks++;
    if (clear_cnt != 6 || exp_res.size() != 0 || exp_mb.size() != 0 || busy) begin
      failures++; $display("FAIL frames %0d pending %0d", clear_cnt, exp_res.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
