// Self-checking test of the sample buffer: random samples are written by
// index in random order (including overwrites) and the parallel outputs are
// compared with a shadow copy after every write.
module tb_sample_buffer;
  import avc_inter_pkg::*;
  localparam int N = 81;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we;
  logic [6:0] widx;
  sample_t wdata;
  sample_t data [N];
  int shadow [N];
  int checks = 0, failures = 0;

  sample_buffer #(.N(N)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; widx = 0; wdata = 0;
    for (int i = 0; i < N; i++) begin
      @(negedge clk); we = 1; widx = 7'(i); wdata = sample_t'(i * 3 + 1); shadow[i] = i * 3 + 1;
    end
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      we = ($urandom_range(0, 3) != 0);
      widx = 7'($urandom_range(0, N - 1)); wdata = sample_t'($urandom);
      if (we) shadow[widx] = int'(wdata);
      @(posedge clk); #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (int'(data[i]) != shadow[i]) begin
          failures++;
          if (failures < 10) $display("entry %0d: got %0d expected %0d", i, data[i], shadow[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
