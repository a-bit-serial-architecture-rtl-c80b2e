// Local reference cache: a 24x24-sample window (6x6 blocks of 4x4 samples)
// onto a reference picture. It is written one 32-bit word (four horizontally
// adjacent samples of one block row) per clock by the pre-fetch unit and read
// one 8-bit sample per clock by the buffer loader. Words are stored as
// row * 6 + word-column; sample x of a word sits in bits [8*(x%4) +: 8].
// The write port and the read port are independent (a simple two-port
// memory), so cache filling can proceed while another block is being read.
// Read coordinates 24..31 wrap to 0..7. The read has one clock of latency. The 24x24 size follows the source
// architecture; the word organisation and the separate write port are this
// design's choices.
module ref_cache
  import avc_inter_pkg::*;
#(
  parameter int unsigned DIM = CACHE_DIM           // samples per side
) (
  input  logic        clk,
  // word write port
  input  logic        we,
  input  logic [4:0]  wrow,                        // sample row 0..DIM-1
  input  logic [2:0]  wcol,                        // word column 0..DIM/4-1
  input  logic [31:0] wdata,
  // sample read port
  input  logic        re,
  input  logic [4:0]  rx,
  input  logic [4:0]  ry,
  output sample_t     rdata                        // valid the clock after re
);
  localparam int unsigned WCOLS = DIM / 4;
  localparam int unsigned WORDS = DIM * WCOLS;
  localparam int unsigned AW    = $clog2(WORDS);

  logic [31:0]   mem [WORDS];
  logic [31:0]   word_q;
  logic [1:0]    sel_q;
  logic [AW-1:0] waddr, raddr;

  // read coordinates wrap around the window, as the block positions of the
  // pre-fetch unit do, so the cache acts as a toroidal window
  logic [4:0] rxw, ryw;
  assign rxw   = (rx >= 5'(DIM)) ? rx - 5'(DIM) : rx;
  assign ryw   = (ry >= 5'(DIM)) ? ry - 5'(DIM) : ry;
  assign waddr = AW'(wrow * WCOLS + wcol);
  assign raddr = AW'(ryw * WCOLS + rxw[4:2]);

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) begin
      word_q <= mem[raddr];
      sel_q  <= rxw[1:0];
    end
  end

  assign rdata = word_q[8*sel_q +: 8];

endmodule
