// Self-checking test of the reference cache: the whole 24x24 window is
// written word by word, then random samples (including wrapped coordinates
// 24..31) are read back with their one-clock latency while writes to other
// words continue on the independent write port.
module tb_ref_cache;
  import avc_inter_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we, re;
  logic [4:0] wrow, rx, ry;
  logic [2:0] wcol;
  logic [31:0] wdata;
  sample_t rdata;
  int shadow [24][24];
  int checks = 0, failures = 0;

  ref_cache dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_word(int r, int c);
    wdata = $urandom;
    we = 1; wrow = 5'(r); wcol = 3'(c);
    for (int k = 0; k < 4; k++) shadow[r][c*4 + k] = int'(wdata[8*k +: 8]);
  endtask

  initial begin
    int ex, x, y;
    we = 0; re = 0; wrow = 0; wcol = 0; wdata = 0; rx = 0; ry = 0;
    for (int r = 0; r < 24; r++)
      for (int c = 0; c < 6; c++) begin
        @(negedge clk); write_word(r, c);
      end
    @(negedge clk) we = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      x = $urandom_range(0, 31); y = $urandom_range(0, 31);
      if (x >= 24 && y >= 24) x = x - 24;
      rx = 5'(x); ry = 5'(y); re = 1;
      ex = shadow[y % 24][x % 24];
      // write somewhere else in the same clock
      we = 0;
      if ($urandom_range(0, 1) == 1) begin
        int r, c;
        r = $urandom_range(0, 23); c = $urandom_range(0, 5);
        if (r != y % 24 || c != (x % 24) / 4) write_word(r, c);
      end
      @(posedge clk); #1;
      checks++;
      if (int'(rdata) != ex) begin
        failures++;
        if (failures < 10) $display("read (%0d,%0d): got %0d expected %0d", x, y, rdata, ex);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
