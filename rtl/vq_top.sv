// vq_top: the video-quality assessment accelerator, NUM_VQ channels wide.
//
// The host splits its video into NUM_VQ independent streams and each is served
// by its own channel: an input stream FIFO, a vq_fpga channel and an output
// stream FIFO. Six channels is the largest configuration the design was
// measured in; the channels share nothing but the clock and reset.
//
// The six channels follow the original design's main configuration.
//
// Interface, per channel c: in_valid[c]/in_ready[c]/in_data[c] carry the
// 128-bit header and microblock words from the host, out_valid[c]/out_ready[c]/
// out_data[c] the 128-bit result words (vq_pkg::vq_result_t) back to it. The
// host-side link and the software that produces and consumes the streams are
// outside this design. FIFO_DEPTH is this design's choice.
module vq_top
  import vq_pkg::*;
#(
  parameter int unsigned NUM_VQ     = 6,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid  [NUM_VQ],
  output logic                in_ready  [NUM_VQ],
  input  logic [STREAM_W-1:0] in_data   [NUM_VQ],
  output logic                out_valid [NUM_VQ],
  input  logic                out_ready [NUM_VQ],
  output logic [STREAM_W-1:0] out_data  [NUM_VQ],
  output logic [NUM_VQ-1:0]   busy,
  output logic [NUM_VQ-1:0]   mb_hit_interlace
);
  for (genvar c = 0; c < NUM_VQ; c++) begin : g_ch
    vq_stream_if #(.W(STREAM_W)) s_in  (.clk, .rst_n);
    vq_stream_if #(.W(STREAM_W)) s_out (.clk, .rst_n);

    vq_stream_fifo #(.W(STREAM_W), .DEPTH(FIFO_DEPTH)) u_in_fifo (
      .clk, .rst_n,
      .in_valid (in_valid[c]), .in_ready (in_ready[c]), .in_data (in_data[c]),
      .out_valid (s_in.valid), .out_ready (s_in.ready), .out_data (s_in.data),
      .level ()
    );

    vq_fpga u_vq (
      .clk, .rst_n, .in_s (s_in), .out_s (s_out),
      .busy (busy[c]), .mb_hit_interlace (mb_hit_interlace[c])
    );

    vq_stream_fifo #(.W(STREAM_W), .DEPTH(FIFO_DEPTH)) u_out_fifo (
      .clk, .rst_n,
      .in_valid (s_out.valid), .in_ready (s_out.ready), .in_data (s_out.data),
      .out_valid (out_valid[c]), .out_ready (out_ready[c]), .out_data (out_data[c]),
      .level ()
    );
  end
endmodule
