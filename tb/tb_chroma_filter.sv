// Self-checking test of the bit-serial chroma filter: random 3x3 windows and
// random fractions (plus all-255 windows at every corner fraction) are
// filtered and the four outputs are compared with the bilinear formula
// ((8-fx)(8-fy)A + fx(8-fy)B + (8-fx)fy C + fx fy D + 32) >> 6. The 16 serial
// clocks plus 4 output clocks (20 clocks from start to the last sample,
// counting the start clock) are checked too.
module tb_chroma_filter;
  import avc_inter_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, ready, out_valid, out_last;
  sample_t win [CHROMA_TAPS];
  sample_t out_sample;
  logic [6:0] w [4];
  int checks = 0, failures = 0;

  chroma_filter dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s[9], fx, fy, e, n, cyc, ox, oy;
    rst_n = 0; start = 0;
    foreach (win[i]) win[i] = '0;
    foreach (w[k]) w[k] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      fx = $urandom_range(0, 7); fy = $urandom_range(0, 7);
      if (t < 64) begin fx = t / 8; fy = t % 8; end
      for (int i = 0; i < 9; i++) begin
        s[i] = (t < 64) ? 255 : $urandom_range(0, 255);
        win[i] = sample_t'(s[i]);
      end
      w[0] = 7'((8 - fx) * (8 - fy)); w[1] = 7'(fx * (8 - fy));
      w[2] = 7'((8 - fx) * fy);       w[3] = 7'(fx * fy);
      wait (ready);
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      foreach (win[i]) win[i] = sample_t'($urandom);
      n = 0; cyc = 1;
      while (n < 4) begin
        @(posedge clk); #1; cyc++;
        if (out_valid) begin
          ox = n % 2; oy = n / 2;
          e = ((8 - fx) * (8 - fy) * s[oy*3 + ox] + fx * (8 - fy) * s[oy*3 + ox + 1] +
               (8 - fx) * fy * s[(oy+1)*3 + ox] + fx * fy * s[(oy+1)*3 + ox + 1] + 32) >> 6;
          checks++;
          if (int'(out_sample) != e) begin
            failures++;
            if (failures < 10) $display("t %0d sample %0d: got %0d expected %0d", t, n, out_sample, e);
          end
          if (out_last != (n == 3)) failures++;
          n++;
        end
      end
      checks++;
      if (cyc != 20) begin failures++; $display("block took %0d clocks", cyc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
