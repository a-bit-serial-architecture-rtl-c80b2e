// Weight generator of the chroma interpolation filter. From the eighth-sample
// fractions (fx, fy) of a chroma motion vector it forms the four bilinear
// weights
//   Fa = (8-fx)(8-fy)  Fb = fx(8-fy)  Fc = (8-fx)fy  Fd = fx*fy
// with a single 4x4-bit multiplier used once per clock, so the weights are
// ready four clocks after `start`, while the reference samples are still
// being loaded. Sharing one multiplier this way follows the source
// architecture; the order of the products and the handshake are this design's.
module chroma_weight_unit (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [2:0] fx,
  input  logic [2:0] fy,
  output logic       done,          // one-clock pulse: all four weights valid
  output logic [6:0] w [4]          // Fa, Fb, Fc, Fd
);
  logic [2:0] step;                  // 0 idle, 1..4 product index + 1
  logic [2:0] fx_q, fy_q;
  logic [3:0] ma, mb;
  logic [7:0] prod;

  // operands for the product being formed in this clock
  always_comb begin
    logic [1:0] k;
    k  = 2'(step - 3'd1);
    ma = k[0] ? {1'b0, fx_q} : 4'd8 - {1'b0, fx_q};
    mb = k[1] ? {1'b0, fy_q} : 4'd8 - {1'b0, fy_q};
    prod = ma * mb;                  // the single multiplier
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step <= '0;
      done <= 1'b0;
      fx_q <= '0;
      fy_q <= '0;
      for (int i = 0; i < 4; i++) w[i] <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        fx_q <= fx;
        fy_q <= fy;
        step <= 3'd1;
      end else if (step != 3'd0) begin
        w[2'(step - 3'd1)] <= prod[6:0];
        if (step == 3'd4) begin
          step <= '0;
          done <= 1'b1;
        end else begin
          step <= step + 3'd1;
        end
      end
    end
  end

endmodule
