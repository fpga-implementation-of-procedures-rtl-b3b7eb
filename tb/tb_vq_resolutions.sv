// tb_vq_resolutions: one frame at each evaluated resolution through a channel.
//
// QVGA (320x240), VGA (640x480), full HD (1920x1080), 4K (4096x2160) and
// 8K (7680x4320) frames are sent back to back into channel 0 of the
// accelerator at its default size, each with a different pattern, and each
// result word is compared with the reference model. With the source never
// pausing, a frame of n microblocks must occupy the channel for exactly n + 4
// cycles at the channel (header, n microblocks, three drain cycles). The test prints the
// clock rate each resolution would need for 30 frames per second on one
// channel.
module tb_vq_resolutions;
  import vq_pkg::*;
  import vq_tb_pkg::*;
  localparam int NV = 6;
  localparam int NR = 5;
  localparam int unsigned RW [NR] = '{320, 640, 1920, 4096, 7680};
  localparam int unsigned RH [NR] = '{240, 480, 1080, 2160, 4320};
  logic clk = 0, rst_n = 0;
  logic                in_valid  [NV];
  logic                in_ready  [NV];
  logic [STREAM_W-1:0] in_data   [NV];
  logic                out_valid [NV];
  logic                out_ready [NV];
  logic [STREAM_W-1:0] out_data  [NV];
  logic [NV-1:0]       busy, mb_hit_interlace;
  int checks = 0, failures = 0;
  int unsigned cyc = 0, n_out = 0;
  int unsigned t_hdr [NR + 1];
  vq_result_t exp_q[$];
  pattern_t pats [NR] = '{P_BLOCKY, P_INTERLACED, P_RANDOM, P_MIXED, P_DARK};

  vq_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid[0] && out_ready[0]) begin
    checks++;
    n_out++;
    if (exp_q.size() == 0 || out_data[0] !== exp_q[0]) begin
      failures++; $display("FAIL result %0d", n_out);
    end
    if (exp_q.size() > 0) void'(exp_q.pop_front());
  end

  // Header acceptance times at the channel itself, behind the input FIFO.
  int unsigned n_hdr = 0;
  always @(posedge clk)
    if (rst_n && dut.g_ch[0].u_vq.u_ctrl.state == dut.g_ch[0].u_vq.u_ctrl.S_HDR &&
        dut.g_ch[0].u_vq.u_ctrl.take) begin
      if (n_hdr <= NR) t_hdr[n_hdr] = cyc;
      n_hdr++;
    end

  task automatic send(logic [STREAM_W-1:0] w, output int unsigned t);
    in_data[0] = w;
    @(posedge clk);
    while (!in_ready[0]) @(posedge clk);
    t = cyc;
    #1;
  endtask

  initial begin
    int unsigned t;
    for (int c = 0; c < NV; c++) begin
      in_valid[c] = 0; in_data[c] = '0; out_ready[c] = 1;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    in_valid[0] = 1;
    for (int r = 0; r < NR; r++) begin
      exp_q.push_back(ref_frame(pats[r], 50 + r, RW[r], RH[r]));
      send(header_word(RW[r], RH[r]), t);
      for (int unsigned b = 0; b < RW[r] * RH[r] / 64; b++)
        for (int unsigned m = 0; m < 4; m++) send(mb_word(pats[r], 50 + r, RW[r], b, m), t);
    end
    send(header_word(0, 0), t);   // an empty frame closes the sequence
    exp_q.push_back(ref_frame(P_FLAT, 0, 0, 0));
    in_valid[0] = 0;
    while (exp_q.size() != 0) @(posedge clk);
    for (int r = 0; r < NR; r++) begin
      automatic int unsigned n = RW[r] * RH[r] / 16;
      checks++;
      if (t_hdr[r + 1] - t_hdr[r] != n + 4) begin
        failures++;
        $display("FAIL %0dx%0d took %0d cycles, expected %0d", RW[r], RH[r], t_hdr[r + 1] - t_hdr[r], n + 4);
      end
      $display("%0dx%0d: %0d cycles per frame, %0d.%0d MHz for 30 frames/s on one channel",
               RW[r], RH[r], t_hdr[r + 1] - t_hdr[r], (n + 4) * 30 / 1000000, ((n + 4) * 30 / 100000) % 10);
    end
    while (exp_q.size() != 0) @(posedge clk);
    checks++;
    if (n_out != NR + 1) begin failures++; $display("FAIL %0d results", n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
