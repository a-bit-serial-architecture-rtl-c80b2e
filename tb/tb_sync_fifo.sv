// Self-checking test of the FIFO: random pushes and pops against a queue
// model, with checks of data order, occupancy and the full/empty flags.
module tb_sync_fifo;
  localparam int W = 16, D = 8;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, wr_valid, wr_ready, rd_valid, rd_ready;
  logic [W-1:0] wr_data, rd_data;
  logic [3:0] count;
  int q[$];
  int checks = 0, failures = 0, fulls = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; wr_valid = 0; rd_ready = 0; wr_data = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      wr_valid = ($urandom_range(0, 99) < ((t / 500) % 2 ? 70 : 30));
      rd_ready = ($urandom_range(0, 99) < ((t / 500) % 2 ? 30 : 70));
      wr_data = W'($urandom);
      #1;
      checks++;
      if (int'(count) != q.size() || wr_ready != (q.size() < D) || rd_valid != (q.size() > 0)) begin
        failures++;
        if (failures < 10) $display("flags: count %0d model %0d", count, q.size());
      end
      if (rd_valid && q.size() > 0) begin
        checks++;
        if (int'(rd_data) != q[0]) begin failures++; $display("data %0h expected %0h", rd_data, q[0]); end
      end
      if (!wr_ready) fulls++;
      @(posedge clk);
      if (rd_valid && rd_ready) void'(q.pop_front());
      if (wr_valid && wr_ready) q.push_back(int'(wr_data));
    end
    checks++;
    if (fulls == 0) begin failures++; $display("FIFO never filled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
