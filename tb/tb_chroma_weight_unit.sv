// Self-checking test of the chroma weight generator: for all 64 fraction
// pairs the four weights are compared with (8-fx)(8-fy), fx(8-fy),
// (8-fx)fy and fx*fy, and `done` must come four clocks after `start`.
module tb_chroma_weight_unit;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, done;
  logic [2:0] fx, fy;
  logic [6:0] w [4];
  int checks = 0, failures = 0;

  chroma_weight_unit dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e[4], cyc;
    rst_n = 0; start = 0; fx = 0; fy = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 64; i++) begin
      fx = 3'(i / 8); fy = 3'(i % 8);
      e[0] = (8 - fx) * (8 - fy); e[1] = fx * (8 - fy);
      e[2] = (8 - fx) * fy;       e[3] = fx * fy;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      fx = 3'($urandom); fy = 3'($urandom);   // must have been captured
      cyc = 1;
      while (!done) begin @(posedge clk); #1; cyc++; end
      checks++;
      if (cyc != 5) begin failures++; $display("done after %0d clocks", cyc); end
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (int'(w[k]) != e[k]) begin
          failures++;
          $display("fraction %0d weight %0d: got %0d expected %0d", i, k, w[k], e[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
