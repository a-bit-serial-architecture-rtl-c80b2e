// Reconstruction block of an H.264/AVC decoder built around the bit-serial
// inter prediction module.
//
//   requests -> command FIFO -> fetch planner -> inter prediction -> prediction FIFO -+
//   coefficients -> coefficient FIFO -> (inverse transform, external)                 |
//   intra prediction (external) ----------------------------> MUX -> + residual -> reconstructed samples
//
// The command FIFO holds partition requests (prediction mode, motion
// vector) and raw commands; the planner turns partitions into cache-update
// and filter commands. The inter prediction module fetches reference blocks
// over the external memory port. The coefficient FIFO feeds the inverse
// transform, whose output (the prediction error) comes back on res_*. The
// intra predictor and the inverse transform are outside this design; their
// streams are ports. The output stage selects inter or intra prediction and
// adds the prediction error.
//
// The inter prediction module cannot be stalled at its output, so the top
// only passes it a filter command when the prediction FIFO has room for that
// block's samples and all earlier ones (a credit count). That FIFO and the
// credit rule are this design's choices.
module avc_recon_top
  import avc_inter_pkg::*;
#(
  parameter int unsigned PIC_W      = 720,
  parameter int unsigned PIC_H      = 576,
  parameter int unsigned ADDR_W     = 18,
  parameter int unsigned CMD_DEPTH  = 16,
  parameter int unsigned COEF_DEPTH = 64,
  parameter int unsigned PRED_DEPTH = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  // command FIFO input
  input  logic              req_valid,
  input  pred_req_t         req,
  output logic              req_ready,
  // coefficient FIFO input and output to the inverse transform
  input  logic              coef_in_valid,
  input  logic [15:0]       coef_in,
  output logic              coef_in_ready,
  output logic              coef_out_valid,
  output logic [15:0]       coef_out,
  input  logic              coef_out_ready,
  // prediction error from the inverse transform
  input  logic              res_valid,
  input  logic signed [9:0] res,
  output logic              res_ready,
  // intra prediction
  input  logic              intra_valid,
  input  sample_t           intra_sample,
  output logic              intra_ready,
  input  logic              sel_intra,
  // external reference memory
  output logic              mem_req,
  output logic [ADDR_W-1:0] mem_addr,
  input  logic              mem_gnt,
  input  logic              mem_rvalid,
  input  logic [31:0]       mem_rdata,
  // reconstructed samples
  output logic              rec_valid,
  output sample_t           rec_sample,
  input  logic              rec_ready
);
  localparam int unsigned REQ_W = $bits(pred_req_t);
  localparam int unsigned CRW   = $clog2(PRED_DEPTH) + 2;

  logic       q_valid, q_ready;
  pred_req_t  q_req;
  logic       pl_valid, pl_ready;
  inter_cmd_t pl_cmd;
  logic       ip_valid, ip_ready;
  logic       p_valid, p_last, p_chroma, ip_busy;
  sample_t    p_sample;
  logic       pf_valid, pf_ready, pf_wready;
  sample_t    pf_sample;
  logic [CRW-1:0] credits;
  logic       room;

  sync_fifo #(.WIDTH(REQ_W), .DEPTH(CMD_DEPTH)) u_cmd_fifo (
    .clk, .rst_n,
    .wr_valid(req_valid), .wr_data(req), .wr_ready(req_ready),
    .rd_valid(q_valid), .rd_data(q_req), .rd_ready(q_ready), .count());

  fetch_planner u_planner (
    .clk, .rst_n,
    .req_valid(q_valid), .req(q_req), .req_ready(q_ready),
    .cmd_valid(pl_valid), .cmd(pl_cmd), .cmd_ready(pl_ready));

  // credit check: room for a whole block in the prediction FIFO
  assign room     = (credits + CRW'(16)) <= CRW'(PRED_DEPTH);
  assign ip_valid = pl_valid && (pl_cmd.op == CMD_FETCH || room);
  assign pl_ready = ip_ready && (pl_cmd.op == CMD_FETCH || room);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) credits <= '0;
    else begin
      logic [CRW-1:0] add;
      add = '0;
      if (ip_valid && ip_ready && pl_cmd.op == CMD_LUMA)   add = CRW'(16);
      if (ip_valid && ip_ready && pl_cmd.op == CMD_CHROMA) add = CRW'(4);
      credits <= credits + add - CRW'(pf_valid && pf_ready);
    end
  end

  inter_pred #(.PIC_W(PIC_W), .PIC_H(PIC_H), .ADDR_W(ADDR_W)) u_inter (
    .clk, .rst_n,
    .cmd_valid(ip_valid), .cmd(pl_cmd), .cmd_ready(ip_ready),
    .mem_req, .mem_addr, .mem_gnt, .mem_rvalid, .mem_rdata,
    .out_valid(p_valid), .out_sample(p_sample), .out_last(p_last),
    .out_chroma(p_chroma), .busy(ip_busy));

  sync_fifo #(.WIDTH(8), .DEPTH(PRED_DEPTH)) u_pred_fifo (
    .clk, .rst_n,
    .wr_valid(p_valid), .wr_data(p_sample), .wr_ready(pf_wready),
    .rd_valid(pf_valid), .rd_data(pf_sample), .rd_ready(pf_ready), .count());

  sync_fifo #(.WIDTH(16), .DEPTH(COEF_DEPTH)) u_coef_fifo (
    .clk, .rst_n,
    .wr_valid(coef_in_valid), .wr_data(coef_in), .wr_ready(coef_in_ready),
    .rd_valid(coef_out_valid), .rd_data(coef_out), .rd_ready(coef_out_ready), .count());

  recon_adder u_recon (
    .clk, .rst_n, .sel_intra,
    .inter_valid(pf_valid), .inter_sample(pf_sample), .inter_ready(pf_ready),
    .intra_valid, .intra_sample, .intra_ready,
    .res_valid, .res, .res_ready,
    .out_valid(rec_valid), .out_sample(rec_sample), .out_ready(rec_ready));

  assert property (@(posedge clk) disable iff (!rst_n) p_valid |-> pf_wready)
    else $error("prediction FIFO overflow");

endmodule
