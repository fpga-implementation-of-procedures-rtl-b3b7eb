// tb_vq_top_full: one full 8K frame (7680 x 4320) on each of the six channels.
//
// The accelerator is used at its default size. Every channel receives the
// header and all 2,073,600 microblocks of its frame back to back, each channel
// a different pattern (random, flat, interlaced, blocky, dark, mixed), and
// its result word is compared with the reference model. The test also checks
// that each channel took one microblock per clock: the header and the whole
// frame in 2,073,601 cycles.
module tb_vq_top_full;
  import vq_pkg::*;
  import vq_tb_pkg::*;
  localparam int NV = 6;
  localparam int unsigned W = 7680, H = 4320;
  logic clk = 0, rst_n = 0;
  logic                in_valid  [NV];
  logic                in_ready  [NV];
  logic [STREAM_W-1:0] in_data   [NV];
  logic                out_valid [NV];
  logic                out_ready [NV];
  logic [STREAM_W-1:0] out_data  [NV];
  logic [NV-1:0]       busy, mb_hit_interlace;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  bit got [NV];
  pattern_t pats [NV] = '{P_RANDOM, P_FLAT, P_INTERLACED, P_BLOCKY, P_DARK, P_MIXED};
  vq_result_t expected [NV];

  vq_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (2200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n)
    for (int c = 0; c < NV; c++)
      if (out_valid[c] && out_ready[c]) begin
        checks++;
        if (got[c] || out_data[c] !== expected[c]) begin
          failures++; $display("FAIL channel %0d result", c);
        end
        got[c] = 1;
      end

  for (genvar c = 0; c < NV; c++) begin : g_host
    initial begin
      int unsigned t0, t1;
      in_valid[c] = 0;
      in_data[c] = '0;
      out_ready[c] = 1;
      got[c] = 0;
      expected[c] = ref_frame(pats[c], 11 + c, W, H);
      @(posedge rst_n);
      @(negedge clk);
      in_valid[c] = 1;
      in_data[c]  = header_word(W, H);
      @(posedge clk);
      while (!in_ready[c]) @(posedge clk);
      t0 = cyc;
      for (int unsigned b = 0; b < W * H / 64; b++)
        for (int unsigned m = 0; m < 4; m++) begin
          #1 in_data[c] = mb_word(pats[c], 11 + c, W, b, m);
          @(posedge clk);
          while (!in_ready[c]) @(posedge clk);
        end
      t1 = cyc;
      #1 in_valid[c] = 0;
      checks++;
      if (t1 - t0 != W * H / 16) begin
        failures++; $display("FAIL channel %0d took %0d cycles for %0d microblocks", c, t1 - t0, W * H / 16);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (got.and() == 1);
    repeat (10) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
