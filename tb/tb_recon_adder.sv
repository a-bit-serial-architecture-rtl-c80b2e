// Self-checking test of the output stage: random inter and intra predictions,
// random prediction errors (including values that clip at 0 and 255) and
// random output stalls. Each result must equal clip(prediction + error) of
// the selected source, in order.
module tb_recon_adder;
  import avc_inter_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, sel_intra;
  logic inter_valid, inter_ready, intra_valid, intra_ready, res_valid, res_ready;
  logic out_valid, out_ready;
  sample_t inter_sample, intra_sample, out_sample;
  logic signed [9:0] res;
  int expq[$];
  int checks = 0, failures = 0, clips = 0;

  recon_adder dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      checks++;
      if (expq.size() == 0 || int'(out_sample) != expq[0]) begin
        failures++;
        if (failures < 10) $display("got %0d expected %0d", out_sample, expq.size() ? expq[0] : -1);
      end
      if (expq.size()) void'(expq.pop_front());
    end
    if (res_valid && res_ready) begin
      int p, s;
      p = sel_intra ? int'(intra_sample) : int'(inter_sample);
      s = p + int'(res);
      if (s < 0 || s > 255) clips++;
      expq.push_back(s < 0 ? 0 : (s > 255 ? 255 : s));
      if (sel_intra ? !intra_ready : !inter_ready) failures++;
    end
  end

  initial begin
    rst_n = 0; sel_intra = 0; inter_valid = 0; intra_valid = 0; res_valid = 0; out_ready = 0;
    inter_sample = 0; intra_sample = 0; res = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      if (t % 16 == 0) sel_intra = $urandom_range(0, 1);
      inter_valid = $urandom_range(0, 3) != 0; inter_sample = sample_t'($urandom);
      intra_valid = $urandom_range(0, 3) != 0; intra_sample = sample_t'($urandom);
      res_valid = $urandom_range(0, 3) != 0;   res = 10'($signed($urandom_range(0, 510)) - 255);
      out_ready = $urandom_range(0, 3) != 0;
    end
    @(negedge clk) begin inter_valid = 0; intra_valid = 0; res_valid = 0; out_ready = 1; end
    repeat (4) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d results missing", expq.size()); end
    checks++;
    if (clips == 0) begin failures++; $display("clipping never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
