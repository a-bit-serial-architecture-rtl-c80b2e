// Self-checking test of the luma filter matrix. For each of the 16
// quarter-sample positions, several random 9x9 windows (plus all-255 and
// all-0 windows that reach the clipping limits) are interpolated and every
// output sample is compared with the integer reference model. The time from
// `start` to the last output sample is checked against 44 clocks, the
// filtering-plus-output time of one 4x4 block.
module tb_luma_filter_matrix;
  import avc_inter_pkg::*;
  import luma_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, ready, out_valid, out_last;
  logic [1:0] fx, fy;
  sample_t win [LUMA_TAPS];
  sample_t out_sample;
  int checks = 0, failures = 0;

  luma_filter_matrix dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w[81];
    int expv, n, cyc;
    rst_n = 0; start = 0; fx = 0; fy = 0;
    foreach (win[i]) win[i] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int pos = 0; pos < 16; pos++) begin
      for (int trial = 0; trial < 6; trial++) begin
        for (int i = 0; i < 81; i++) begin
          case (trial)
            0: w[i] = 255;
            1: w[i] = (i % 2) ? 255 : 0;
            default: w[i] = $urandom_range(0, 255);
          endcase
          win[i] = sample_t'(w[i]);
        end
        fx = pos[3:2]; fy = pos[1:0];
        wait (ready);
        @(negedge clk) start = 1;
        @(negedge clk) start = 0;
        // randomise the window while the block is in flight: the matrix must
        // have captured it at start
        foreach (win[i]) win[i] = sample_t'($urandom);
        n = 0; cyc = 1;
        while (n < 16) begin
          @(posedge clk); #1;
          cyc++;               // clocks counted from the start clock (1)
          if (out_valid) begin
            expv = luma_pred(w, pos / 4, pos % 4, n % 4, n / 4);
            checks++;
            if (int'(out_sample) != expv) begin
              failures++;
              if (failures < 10)
                $display("pos %0d trial %0d sample %0d: got %0d expected %0d",
                         pos, trial, n, out_sample, expv);
            end
            if ((n == 15) != out_last) failures++;
            n++;
          end
        end
        checks++;
        if (cyc != 44) begin
          failures++;
          $display("block took %0d clocks, expected 44", cyc);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
