// Inter prediction module of an H.264/AVC decoder: local cache with data
// pre-fetch, a sample buffer and bit-serial filters.
//
// Commands (see avc_inter_pkg::inter_cmd_t) arrive through a valid/ready
// port. FETCH commands make the pre-fetch unit copy 4x4 reference blocks
// from external memory into the 24x24-sample cache with one of the reading
// modes M0..M3. LUMA commands copy a 9x9 window from the cache into the
// buffer and interpolate one 4x4 luma block at any quarter-sample position
// with the bit-serial filter matrix. CHROMA commands copy a 3x3 window and
// interpolate a 2x2 chroma block at any eighth-sample position with the
// bit-serial chroma filter, whose weights are formed while the window loads.
//
// Predicted samples leave one per clock on out_*: 16 per LUMA command in
// raster order, 4 per CHROMA command; out_last marks the last sample of a
// block and out_chroma tells the two apart. A LUMA command takes 81 cache
// reads plus 44 clocks of filtering and output; the next block's reads and
// cache fills overlap the filtering. The block structure follows the source
// architecture; the command set and interfaces are this design's.
module inter_pred
  import avc_inter_pkg::*;
#(
  parameter int unsigned PIC_W  = 720,
  parameter int unsigned PIC_H  = 576,
  parameter int unsigned ADDR_W = 18
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cmd_valid,
  input  inter_cmd_t        cmd,
  output logic              cmd_ready,
  // external memory
  output logic              mem_req,
  output logic [ADDR_W-1:0] mem_addr,
  input  logic              mem_gnt,
  input  logic              mem_rvalid,
  input  logic [31:0]       mem_rdata,
  // prediction output
  output logic              out_valid,
  output sample_t           out_sample,
  output logic              out_last,
  output logic              out_chroma,
  output logic              busy
);
  logic       pf_start, pf_ready;
  logic       cache_we;
  logic [4:0] cache_wrow;
  logic [2:0] cache_wcol;
  logic [31:0] cache_wdata;
  logic       cache_re;
  logic [4:0] cache_rx, cache_ry;
  sample_t    cache_rdata;
  logic       lbuf_we, cbuf_we;
  logic [6:0] buf_widx;
  sample_t    lwin [LUMA_TAPS];
  sample_t    cwin [CHROMA_TAPS];
  logic       luma_start, luma_ready, chroma_start, chroma_ready;
  logic [1:0] luma_fx, luma_fy;
  logic       wu_start, wu_done;
  logic [2:0] wu_fx, wu_fy;
  logic [6:0] weights [4];
  logic       l_valid, l_last, c_valid, c_last;
  sample_t    l_sample, c_sample;

  inter_pred_ctrl u_ctrl (
    .clk, .rst_n, .cmd_valid, .cmd, .cmd_ready,
    .pf_start, .pf_ready,
    .cache_re, .cache_rx, .cache_ry,
    .lbuf_we, .cbuf_we, .buf_widx,
    .luma_start, .luma_fx, .luma_fy, .luma_ready,
    .wu_start, .wu_fx, .wu_fy,
    .chroma_start, .chroma_ready);

  prefetch_unit #(.PIC_W(PIC_W), .PIC_H(PIC_H), .ADDR_W(ADDR_W)) u_prefetch (
    .clk, .rst_n,
    .start(pf_start), .mode(cmd.mode), .plane(cmd.plane),
    .bx(cmd.bx), .by(cmd.by), .cx(cmd.cx), .cy(cmd.cy),
    .ready(pf_ready),
    .mem_req, .mem_addr, .mem_gnt, .mem_rvalid, .mem_rdata,
    .cache_we, .cache_wrow, .cache_wcol, .cache_wdata);

  ref_cache u_cache (
    .clk,
    .we(cache_we), .wrow(cache_wrow), .wcol(cache_wcol), .wdata(cache_wdata),
    .re(cache_re), .rx(cache_rx), .ry(cache_ry), .rdata(cache_rdata));

  sample_buffer #(.N(LUMA_TAPS)) u_lbuf (
    .clk, .we(lbuf_we), .widx(buf_widx), .wdata(cache_rdata), .data(lwin));

  sample_buffer #(.N(CHROMA_TAPS)) u_cbuf (
    .clk, .we(cbuf_we), .widx(buf_widx[3:0]), .wdata(cache_rdata), .data(cwin));

  luma_filter_matrix u_luma (
    .clk, .rst_n, .start(luma_start), .win(lwin), .fx(luma_fx), .fy(luma_fy),
    .ready(luma_ready), .out_valid(l_valid), .out_sample(l_sample), .out_last(l_last));

  chroma_weight_unit u_weights (
    .clk, .rst_n, .start(wu_start), .fx(wu_fx), .fy(wu_fy), .done(wu_done), .w(weights));

  chroma_filter u_chroma (
    .clk, .rst_n, .start(chroma_start), .win(cwin), .w(weights),
    .ready(chroma_ready), .out_valid(c_valid), .out_sample(c_sample), .out_last(c_last));

  // the controller starts a filter only when both are idle, so at most one
  // of them drives the output at a time
  assign out_valid  = l_valid | c_valid;
  assign out_sample = c_valid ? c_sample : l_sample;
  assign out_last   = c_valid ? c_last : l_last;
  assign out_chroma = c_valid;
  assign busy       = !pf_ready || !luma_ready || !chroma_ready || !cmd_ready;

  // the weights are formed within the 10 clocks of the 3x3 window load
  logic wu_pending;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)          wu_pending <= 1'b0;
    else if (wu_start)   wu_pending <= 1'b1;
    else if (wu_done)    wu_pending <= 1'b0;

  assert property (@(posedge clk) disable iff (!rst_n) chroma_start |-> !wu_pending)
    else $error("chroma filter started before its weights were ready");
  assert property (@(posedge clk) disable iff (!rst_n) !(l_valid && c_valid))
    else $error("both filters drive the output");

endmodule
