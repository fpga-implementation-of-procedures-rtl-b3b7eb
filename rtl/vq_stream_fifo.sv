// vq_stream_fifo: first-in first-out buffer that carries one stream.
//
// The channel's processes talk through streams, and a stream in hardware is a
// FIFO. This one is a circular buffer of DEPTH words with separate read and
// write pointers and an occupancy counter. Both sides use a valid/ready
// handshake: a word is written when in_valid && in_ready and read when
// out_valid && out_ready. out_data shows the oldest word as soon as it is
// written (one cycle from write to read), and a full FIFO can be written in
// the same cycle it is read. The depth is this design's choice; the width of
// 128 bits is the platform stream width.
module vq_stream_fifo #(
  parameter int unsigned W     = vq_pkg::STREAM_W,
  parameter int unsigned DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data,
  output logic [$clog2(DEPTH+1)-1:0] level
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic          do_wr, do_rd;

  assign out_valid = (level != 0);
  assign in_ready  = (level != DEPTH[$bits(level)-1:0]) || out_ready;
  assign do_wr     = in_valid && in_ready;
  assign do_rd     = out_valid && out_ready;
  assign out_data  = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      level  <= '0;
    end else begin
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      case ({do_wr, do_rd})
        2'b10:   level <= level + 1'b1;
        2'b01:   level <= level - 1'b1;
        default: level <= level;
      endcase
    end
  end
endmodule
