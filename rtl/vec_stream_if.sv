// Valid/ready stream of 1024-bit vectors, the link between the data
// dispatcher, a compute tile and the data collector.
//
// A beat moves on a rising clock edge where valid and ready are both high.
// `last` marks the final beat of a tile's result block. The source must hold
// valid, data and last steady while valid is high and ready is low; the
// assertion below checks that rule. The handshake is this design's choice:
// the reference design only says that data is streamed between the parts.
interface vec_stream_if
  import kmeans_pkg::*;
(
  input logic clk,
  input logic rst_n
);
  logic valid;
  logic ready;
  logic last;
  vec_t data;

  modport source (output valid, output last, output data, input ready);
  modport sink   (input valid, input last, input data, output ready);

  property p_hold;
    @(posedge clk) disable iff (!rst_n)
      (valid && !ready) |=> (valid && $stable(data) && $stable(last));
  endproperty
  a_hold: assert property (p_hold) else $error("vec_stream_if: beat changed while stalled");

endinterface
