// vq_frame_ctrl: frame sequencing of one video-quality channel.
//
// Each frame on the input stream starts with a header word giving its
// resolution, followed by width*height/16 microblock words. The controller
// reads the header, computes how many microblocks to expect, and passes each
// microblock word on, registered, together with its position in the 8x8 block
// (mb_idx 0..3, counted from the start of the frame). After the last
// microblock it waits PIPE_DEPTH cycles for the metric units to settle, then
// captures their result into the output register and pulses clear, which
// resets every metric register for the next frame. The result word is offered
// on the output stream until it is taken.
//
// States: HDR (wait for a header), DATA (take microblocks), DRAIN (let the
// metric pipeline finish). The next header is accepted while a result is still
// waiting on the output. If the previous result has not been taken when the
// next frame ends, the capture, and with it the input, waits: the design's own
// way of handling a consumer that falls behind.
//
// Timing: one microblock per clock while in DATA. The last microblock accepted
// at clock edge t gives out_valid from edge t+PIPE_DEPTH. The header layout (width
// in bits 15:0, height in 31:16) and the valid/ready handshake are this
// design's choices; the width and height are expected to be multiples of 8.
module vq_frame_ctrl
  import vq_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // input stream: header, then microblocks
  input  logic                in_valid,
  output logic                in_ready,
  input  logic [STREAM_W-1:0] in_data,
  // microblocks to the metric units
  output logic                mb_valid,
  output logic [1:0]          mb_idx,
  output microblock_t         mb,
  output logic                clear,
  // result of the metric units and output stream
  input  vq_result_t          result,
  output logic                out_valid,
  input  logic                out_ready,
  output vq_result_t          out_data,
  // status
  output logic                busy
);
  typedef enum logic [1:0] {S_HDR, S_DATA, S_DRAIN} state_t;

  state_t      state;
  sum_t        mb_total;       // microblocks in this frame
  sum_t        mb_cnt;         // microblocks taken so far
  logic [$clog2(PIPE_DEPTH+1)-1:0] drain_cnt;
  logic [DIM_W-1:0] hdr_w, hdr_h;
  sum_t        hdr_total;
  logic        take;
  logic        drain_done;

  // Header fields, in the layout of vq_header_t.
  assign hdr_w     = in_data[DIM_W-1:0];
  assign hdr_h     = in_data[2*DIM_W-1:DIM_W];
  assign hdr_total = SUM_W'((32'(hdr_w) * 32'(hdr_h)) >> 4);
  assign in_ready  = (state == S_HDR) || (state == S_DATA);
  assign take      = in_valid && in_ready;
  assign drain_done = (state == S_DRAIN) &&
                      (drain_cnt == ($bits(drain_cnt))'(PIPE_DEPTH - 1));
  // Capture only when the output register is free or being emptied.
  assign clear     = drain_done && (!out_valid || out_ready);
  assign busy      = (state != S_HDR);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_HDR;
      mb_total  <= '0;
      mb_cnt    <= '0;
      drain_cnt <= '0;
      mb_valid  <= 1'b0;
      mb_idx    <= '0;
      mb        <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      mb_valid <= 1'b0;
      if (out_valid && out_ready) out_valid <= 1'b0;

      unique case (state)
        S_HDR: if (take) begin
          mb_total  <= hdr_total;
          mb_cnt    <= '0;
          drain_cnt <= '0;
          state     <= (hdr_total == '0) ? S_DRAIN : S_DATA;
        end
        S_DATA: if (take) begin
          mb_valid <= 1'b1;
          mb       <= microblock_t'(in_data);
          mb_idx   <= mb_cnt[1:0];
          mb_cnt   <= mb_cnt + 1'b1;
          if (mb_cnt == mb_total - 1'b1) state <= S_DRAIN;
        end
        S_DRAIN: begin
          if (!drain_done) drain_cnt <= drain_cnt + 1'b1;
          if (clear) begin
            out_data  <= result;
            out_valid <= 1'b1;
            drain_cnt <= '0;
            state     <= S_HDR;
          end
        end
        default: state <= S_HDR;
      endcase
    end
  end

  // The end-of-frame clear must never meet a microblock still in flight.
  a_clear_idle : assert property (@(posedge clk) disable iff (!rst_n) !(clear && mb_valid))
    else $error("clear while a microblock is being processed");
endmodule
