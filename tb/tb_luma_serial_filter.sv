// Self-checking test of the bit-serial 6-tap filter: random 8-bit unsigned
// operands (and the extremes) are shifted in LSB first with zero extension,
// the 16-bit serial result is collected and compared with
// a - 5b + 20c + 20d - 5e + f computed in integer arithmetic. Words are sent
// back to back to check that no state leaks from one word to the next.
module tb_luma_serial_filter;
  localparam int NB = 16;
  logic clk = 0;
  always #5 clk = ~clk;

  logic first, a, b, c, d, e, f, y;
  int checks = 0, failures = 0;

  luma_serial_filter dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v[6];
    int expv, got;
    logic [NB-1:0] res;
    first = 0; {a, b, c, d, e, f} = '0;
    @(negedge clk);
    for (int n = 0; n < 300; n++) begin
      for (int k = 0; k < 6; k++) v[k] = $urandom_range(0, 255);
      if (n == 0) v = '{0, 255, 0, 0, 255, 0};       // most negative
      if (n == 1) v = '{255, 0, 255, 255, 0, 255};   // most positive
      expv = v[0] - 5*v[1] + 20*v[2] + 20*v[3] - 5*v[4] + v[5];
      res = '0;
      for (int t = 0; t < NB; t++) begin
        first = (t == 0);
        a = (t < 8) ? v[0][t] : 1'b0; b = (t < 8) ? v[1][t] : 1'b0;
        c = (t < 8) ? v[2][t] : 1'b0; d = (t < 8) ? v[3][t] : 1'b0;
        e = (t < 8) ? v[4][t] : 1'b0; f = (t < 8) ? v[5][t] : 1'b0;
        @(posedge clk); #1;
        res[t] = y;             // output register holds bit t
        @(negedge clk);
      end
      got = int'($signed(res));
      checks++;
      if (got != expv) begin
        failures++;
        if (failures < 10) $display("mismatch %p: got %0d expected %0d", v, got, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
