// tb_vq_top: end-to-end test of the six-channel accelerator.
//
// All six channels run at once, each with its own list of frames, so every
// test pattern passes through every channel over the run. Hosts offer words
// with random gaps and take results with random pauses, including long ones
// that fill the output FIFO and hold a channel's capture. Every result word
// is compared with the reference model. The test also counts how often each
// mechanism of the design happened and fails if one never did:
//   blackout frames and non-blackout frames, interlaced microblocks, dark
//   and bright exposure results, input back-pressure (in_ready low),
//   output back-pressure (results waiting), a capture held by a full output,
//   per-frame reset (several frames per channel) and all channels busy at
//   once.
module tb_vq_top;
  import vq_pkg::*;
  import vq_tb_pkg::*;
  localparam int NV = 6;
  logic clk = 0, rst_n = 0;
  logic                in_valid  [NV];
  logic                in_ready  [NV];
  logic [STREAM_W-1:0] in_data   [NV];
  logic                out_valid [NV];
  logic                out_ready [NV];
  logic [STREAM_W-1:0] out_data  [NV];
  logic [NV-1:0]       busy, mb_hit_interlace;
  int checks = 0, failures = 0;
  vq_result_t exp_q [NV][$];
  int unsigned frames_out [NV];
  int pause_left [NV];
  bit done [NV];
  int n_blackout = 0, n_clear_frames = 0, n_ilace_mb = 0, n_dark = 0, n_bright = 0;
  int n_in_stall = 0, n_out_stall = 0, n_capture_held = 0, n_all_busy = 0;

  vq_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired"); for (int c = 0; c < NV; c++) $display("ch%0d out %0d pend %0d done %0d", c, frames_out[c], exp_q[c].size(), done[c]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk)
    for (int c = 0; c < NV; c++)
      out_ready[c] = (pause_left[c] == 0) && ($urandom_range(0, 3) != 0);

  always @(posedge clk)
    for (int c = 0; c < NV; c++) if (pause_left[c] > 0) pause_left[c]--;

  always @(posedge clk) if (rst_n) begin
    if (&busy) n_all_busy++;
    n_ilace_mb += $countones(mb_hit_interlace);
    for (int c = 0; c < NV; c++) begin
      if (in_valid[c] && !in_ready[c]) n_in_stall++;
      if (out_valid[c] && !out_ready[c]) n_out_stall++;
      if (out_valid[c] && out_ready[c]) begin
        vq_result_t got, e;
        got = vq_result_t'(out_data[c]);
        checks++;
        frames_out[c]++;
        if (exp_q[c].size() == 0) begin
          failures++; $display("FAIL ch%0d unexpected result", c);
        end else begin
          e = exp_q[c].pop_front();
          if (got !== e) begin failures++; $display("FAIL ch%0d result mismatch", c); end
        end
        if (got.blackout) n_blackout++; else n_clear_frames++;
        if (got.exposure < 30)  n_dark++;
        if (got.exposure > 220) n_bright++;
      end
    end
  end

  // A capture is held when the frame is over but the channel's output word
  // has not been taken.
  for (genvar c = 0; c < NV; c++) begin : g_mon
    always @(posedge clk)
      if (rst_n && dut.g_ch[c].u_vq.u_ctrl.drain_done && !dut.g_ch[c].u_vq.u_ctrl.clear)
        n_capture_held++;
  end

  task automatic put(int c, logic [STREAM_W-1:0] w);
    @(negedge clk);
    while ($urandom_range(0, 7) == 0) begin in_valid[c] = 0; @(negedge clk); end
    in_valid[c] = 1;
    in_data[c]  = w;
    @(posedge clk);
    while (!in_ready[c]) @(posedge clk);
    @(negedge clk);
    in_valid[c] = 0;
  endtask

  task automatic frame(int c, pattern_t p, int unsigned seed, int unsigned w, int unsigned h);
    exp_q[c].push_back(ref_frame(p, seed, w, h));
    put(c, header_word(w, h));
    for (int unsigned b = 0; b < w * h / 64; b++)
      for (int unsigned m = 0; m < 4; m++) put(c, mb_word(p, seed, w, b, m));
  endtask

  task automatic host(int c);
    pattern_t order[7] = '{P_RANDOM, P_FLAT, P_INTERLACED, P_BLOCKY, P_DARK, P_BRIGHT, P_MIXED};
    for (int i = 0; i < 7; i++) begin
      pattern_t p = order[(i + c) % 7];
      frame(c, p, 100 * c + i, 32 + 16 * ((i + c) % 4), 16 + 8 * (c % 3));
    end
    // the host stops reading: tiny frames pile up in the output FIFO
    // for 2000 cycles, then resumes
    pause_left[c] = 2000;
    for (int i = 0; i < 24; i++) frame(c, P_RANDOM, 1000 + i, 16, 16);
    frame(c, P_FLAT, 42, 16, 16);
    done[c] = 1;
  endtask

  for (genvar c = 0; c < NV; c++) begin : g_host
    initial begin
      @(posedge rst_n);
      host(c);
    end
  end

  initial begin
    for (int c = 0; c < NV; c++) begin
      in_valid[c] = 0; in_data[c] = '0; pause_left[c] = 0; done[c] = 0; frames_out[c] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done.and() == 1);
    for (int c = 0; c < NV; c++) while (exp_q[c].size() != 0) @(posedge clk);
    for (int c = 0; c < NV; c++) begin
      checks++;
      if (frames_out[c] != 32) begin failures++; $display("FAIL ch%0d gave %0d results", c, frames_out[c]); end
    end
    $display("mechanisms: blackout=%0d not_blackout=%0d interlaced_mb=%0d dark=%0d bright=%0d",
             n_blackout, n_clear_frames, n_ilace_mb, n_dark, n_bright);
    $display("            in_stall=%0d out_stall=%0d capture_held=%0d all_busy=%0d",
             n_in_stall, n_out_stall, n_capture_held, n_all_busy);
    checks++; if (n_blackout == 0)     begin failures++; $display("FAIL no blackout"); end
    checks++; if (n_clear_frames == 0) begin failures++; $display("FAIL no normal frame"); end
    checks++; if (n_ilace_mb == 0)     begin failures++; $display("FAIL no interlace"); end
    checks++; if (n_dark == 0)         begin failures++; $display("FAIL no dark frame"); end
    checks++; if (n_bright == 0)       begin failures++; $display("FAIL no bright frame"); end
    checks++; if (n_in_stall == 0)     begin failures++; $display("FAIL no input stall"); end
    checks++; if (n_out_stall == 0)    begin failures++; $display("FAIL no output stall"); end
    checks++; if (n_capture_held == 0) begin failures++; $display("FAIL no held capture"); end
    checks++; if (n_all_busy == 0)     begin failures++; $display("FAIL channels never all busy"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
