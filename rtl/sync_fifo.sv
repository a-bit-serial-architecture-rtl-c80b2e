// Synchronous FIFO queue with valid/ready handshakes on both sides, used for
// the command queue, the coefficient queue and the prediction-sample queue of
// the reconstruction block. First-word fall-through: the head entry is
// visible on rd_data while rd_valid is high. `count` gives the occupancy.
// The source architecture names the queues and their role as the interfaces
// of the reconstruction block; depth, width and handshake are this design's.
module sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 16        // a power of two
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_valid,
  input  logic [WIDTH-1:0]         wr_data,
  output logic                     wr_ready,
  output logic                     rd_valid,
  output logic [WIDTH-1:0]         rd_data,
  input  logic                     rd_ready,
  output logic [$clog2(DEPTH):0]   count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;
  logic             push, pop;

  assign count    = wptr - rptr;
  assign wr_ready = (count != (AW+1)'(DEPTH));
  assign rd_valid = (count != '0);
  assign rd_data  = mem[rptr[AW-1:0]];
  assign push     = wr_valid && wr_ready;
  assign pop      = rd_valid && rd_ready;

  always_ff @(posedge clk) if (push) mem[wptr[AW-1:0]] <= wr_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (push) wptr <= wptr + 1'b1;
      if (pop)  rptr <= rptr + 1'b1;
    end
  end

  initial assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
    else $error("DEPTH must be a power of two");
  assert property (@(posedge clk) disable iff (!rst_n) count <= (AW+1)'(DEPTH));

endmodule
