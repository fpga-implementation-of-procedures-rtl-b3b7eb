// vq_stream_if: one 128-bit stream between two processes of the channel.
//
// A stream moves a word when valid and ready are both high on a rising clock
// edge. The sender may not withdraw or change a word it has offered until it
// is taken; the assertion below checks that rule. The valid/ready handshake is
// this design's choice for the streams that connect the processes.
interface vq_stream_if #(
  parameter int unsigned W = vq_pkg::STREAM_W
) (
  input logic clk,
  input logic rst_n
);
  logic         valid;
  logic         ready;
  logic [W-1:0] data;

  modport source (output valid, output data, input ready);
  modport sink   (input valid, input data, output ready);

  a_hold : assert property (@(posedge clk) disable iff (!rst_n)
                            valid && !ready |=> valid && $stable(data))
    else $error("stream word withdrawn or changed before it was taken");
endinterface
