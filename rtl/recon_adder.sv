// Output stage of the reconstruction block: a multiplexer chooses the inter
// or the intra prediction sample and an adder adds the prediction error from
// the inverse transform, clipping the result to 0..255. All three streams
// use valid/ready; a sample is produced when the selected prediction and a
// residual are both present, and the result is registered (one clock of
// latency, full throughput). The multiplexer and adder are those of the
// source architecture's block diagram; the select port, handshake and
// clipping follow common decoder practice and are this design's choices.
module recon_adder
  import avc_inter_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sel_intra,      // 0: inter prediction, 1: intra
  input  logic              inter_valid,
  input  sample_t           inter_sample,
  output logic              inter_ready,
  input  logic              intra_valid,
  input  sample_t           intra_sample,
  output logic              intra_ready,
  input  logic              res_valid,
  input  logic signed [9:0] res,            // prediction error, -255..255
  output logic              res_ready,
  output logic              out_valid,
  output sample_t           out_sample,
  input  logic              out_ready
);
  logic        pred_valid, fire, can_load;
  sample_t     pred;
  logic signed [10:0] sum;

  assign pred_valid = sel_intra ? intra_valid : inter_valid;
  assign pred       = sel_intra ? intra_sample : inter_sample;
  assign can_load   = !out_valid || out_ready;
  assign fire       = pred_valid && res_valid && can_load;

  assign inter_ready = fire && !sel_intra;
  assign intra_ready = fire && sel_intra;
  assign res_ready   = fire;

  assign sum = $signed({3'b000, pred}) + 11'(res);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_sample <= '0;
    end else if (can_load) begin
      out_valid <= fire;
      if (fire)
        out_sample <= (sum < 0) ? 8'd0 : (sum > 255) ? 8'd255 : sample_t'(sum);
    end
  end

endmodule
