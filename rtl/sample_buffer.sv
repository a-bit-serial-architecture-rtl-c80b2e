// Buffer between the cache and a filter block (BUFF): N samples written one
// per clock by index and presented to the filter all at once. The filter
// copies the whole buffer when it starts, so the next window can be loaded
// while the previous one is still being filtered. The source architecture
// names the buffer; its write-by-index organisation is this design's choice.
module sample_buffer
  import avc_inter_pkg::*;
#(
  parameter int unsigned N = LUMA_TAPS
) (
  input  logic                 clk,
  input  logic                 we,
  input  logic [$clog2(N)-1:0] widx,
  input  sample_t              wdata,
  output sample_t              data [N]
);
  always_ff @(posedge clk)
    if (we) data[widx] <= wdata;

  initial assert (N > 1) else $error("N must be above 1");
endmodule
