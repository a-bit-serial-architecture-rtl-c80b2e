// Bit-serial chroma interpolation filter for a 2x2 block of chroma samples.
//
// Each predicted sample is (Fa*A + Fb*B + Fc*C + Fd*D + 32) >> 6, where A..D
// are the four surrounding integer samples and Fa..Fd the weights from
// chroma_weight_unit. The nine samples of the 3x3 reference window are
// shifted out least significant bit first. For every output sample four
// serial-parallel multipliers are used: the sample bit gates the parallel
// weight (an AND), the gated weight is added into a 6-bit accumulator, the
// sum's low bit leaves as the next product bit and the rest is kept shifted
// right by one. A 4-input serial adder (the output accumulator) sums the four
// product bit streams and shifts the total into a parallel result register.
// The four output samples are computed at the same time.
//
// Timing: after `start`, CH_CYCLES serial clocks (16 by default: 8 sample
// bits and the accumulators draining) and then the four samples leave one per
// clock in raster order. The structure follows the source architecture; the
// output order, rounding after the serial pass and the handshake are this
// design's choices.
module chroma_filter
  import avc_inter_pkg::*;
#(
  parameter int unsigned CH_CYCLES = 16     // serial clocks, at least 15
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  sample_t  win [CHROMA_TAPS],       // row-major 3x3 window
  input  logic [6:0] w [4],                 // Fa, Fb, Fc, Fd
  output logic     ready,
  output logic     out_valid,
  output sample_t  out_sample,
  output logic     out_last
);
  localparam int unsigned ACC_W = 6;
  localparam int unsigned RES_W = 16;
  localparam int unsigned CW    = $clog2(CH_CYCLES + 1);

  typedef enum logic [1:0] {S_IDLE, S_SER, S_OUT} state_e;
  state_e state;
  logic [CW-1:0] cnt;
  logic [1:0]    ocnt;

  sample_t          sh [CHROMA_TAPS];
  logic [6:0]       w_q [4];
  logic [ACC_W-1:0] acc [4][4];        // [output sample][A..D]
  logic [1:0]       da_carry [4];
  logic [RES_W-1:0] res [4];
  logic [ACC_W:0]   msum [4][4];
  logic             pbit [4][4];
  logic [3:0]       dsum [4];

  assign ready = (state == S_IDLE);

  // multipliers and output accumulators
  always_comb begin
    for (int o = 0; o < 4; o++) begin
      dsum[o] = {2'b00, da_carry[o]};
      for (int k = 0; k < 4; k++) begin
        int idx;
        idx = (o / 2 + k / 2) * int'(CHROMA_WIN) + (o % 2) + (k % 2);
        msum[o][k] = {1'b0, acc[o][k]} + (sh[idx][0] ? w_q[k] : 7'd0);
        pbit[o][k] = msum[o][k][0];
        dsum[o]    = dsum[o] + {3'b000, pbit[o][k]};
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      ocnt  <= '0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          state <= S_SER;
          cnt   <= '0;
        end
        S_SER: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(CH_CYCLES - 1)) begin
            state <= S_OUT;
            ocnt  <= '0;
          end
        end
        S_OUT: begin
          ocnt <= ocnt + 1'b1;
          if (ocnt == 2'd3) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state == S_IDLE && start) begin
      for (int i = 0; i < int'(CHROMA_TAPS); i++) sh[i] <= win[i];
      for (int k = 0; k < 4; k++) w_q[k] <= w[k];
      for (int o = 0; o < 4; o++) begin
        da_carry[o] <= '0;
        for (int k = 0; k < 4; k++) acc[o][k] <= '0;
      end
    end else if (state == S_SER) begin
      for (int i = 0; i < int'(CHROMA_TAPS); i++) sh[i] <= sh[i] >> 1;
      for (int o = 0; o < 4; o++) begin
        for (int k = 0; k < 4; k++) acc[o][k] <= msum[o][k][ACC_W:1];
        da_carry[o] <= dsum[o][2:1];
        res[o]      <= {dsum[o][0], res[o][RES_W-1:1]};
      end
    end
  end

  logic [RES_W-1:0] rounded;
  always_comb begin
    // after CH_CYCLES shifts, bit t of the total sits at RES_W-CH_CYCLES+t
    rounded = (res[ocnt] >> (RES_W - CH_CYCLES)) + RES_W'(32);
  end

  assign out_valid  = (state == S_OUT);
  assign out_sample = rounded[13:6];
  assign out_last   = (state == S_OUT) && (ocnt == 2'd3);

  initial assert (CH_CYCLES >= 15 && CH_CYCLES <= RES_W)
    else $error("CH_CYCLES must be in 15..%0d", RES_W);

endmodule
