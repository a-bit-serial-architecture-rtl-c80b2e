// Self-checking test of the pre-fetch unit against the memory model (with
// random grant stalls and a 4-clock read latency). For random reading modes,
// planes, picture positions and cache positions (including ones that wrap
// around the 6x6 cache) every cache write is compared with the expected
// (row, word column, data) sequence, the number of words per mode is checked
// (36 / 12 / 12 / 4), and the request line must never idle while words are
// left to request.
module tb_prefetch_unit;
  import avc_inter_pkg::*;
  import frame_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, ready, mem_req, mem_gnt, mem_rvalid, cache_we;
  rd_mode_e mode;
  plane_e plane;
  logic [7:0] bx, by;
  logic [2:0] cx, cy, cache_wcol;
  logic [17:0] mem_addr;
  logic [31:0] mem_rdata, cache_wdata;
  logic [4:0] cache_wrow;
  int words_read;
  int checks = 0, failures = 0;
  int exp_row[$], exp_col[$];
  logic [31:0] exp_data[$];

  prefetch_unit dut (.*);
  frame_ram_model #(.ADDR_W(18), .LAT(4), .STALL_PCT(25)) u_ram (
    .clk, .rst_n, .req(mem_req), .addr(mem_addr), .gnt(mem_gnt),
    .rvalid(mem_rvalid), .rdata(mem_rdata), .words_read);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && cache_we) begin
    checks++;
    if (exp_row.size() == 0) begin failures++; $display("unexpected cache write"); end
    else begin
      if (int'(cache_wrow) != exp_row[0] || int'(cache_wcol) != exp_col[0] || cache_wdata != exp_data[0]) begin
        failures++;
        if (failures < 10) $display("write row %0d col %0d data %h, expected row %0d col %0d data %h",
                                    cache_wrow, cache_wcol, cache_wdata, exp_row[0], exp_col[0], exp_data[0]);
      end
      void'(exp_row.pop_front()); void'(exp_col.pop_front()); void'(exp_data.pop_front());
    end
  end

  initial begin
    int m, p, nw, nh, base, bw, w0, bxi, byi;
    rst_n = 0; start = 0; mode = RD_M0; plane = PLANE_Y; bx = 0; by = 0; cx = 0; cy = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      m = t % 4; p = $urandom_range(0, 2);
      nw = (m == 0 || m == 1) ? 3 : 1;
      nh = (m == 0 || m == 2) ? 3 : 1;
      base = (p == 0) ? 0 : (p == 1) ? Y_WORDS : Y_WORDS + C_WORDS;
      bw = (p == 0) ? PIC_W / 4 : PIC_W / 8;
      bxi = $urandom_range(0, bw - 3);
      byi = $urandom_range(0, ((p == 0) ? PIC_H / 4 : PIC_H / 8) - 3);
      mode = rd_mode_e'(m); plane = plane_e'(p);
      bx = 8'(bxi); by = 8'(byi);
      cx = 3'($urandom_range(0, 5)); cy = 3'($urandom_range(0, 5));
      for (int k = 0; k < nw * nh; k++)
        for (int r = 0; r < 4; r++) begin
          exp_row.push_back(((cy + k / nw) % 6) * 4 + r);
          exp_col.push_back((cx + k % nw) % 6);
          exp_data.push_back(word_at(base + ((byi + k / nw) * bw + bxi + k % nw) * 4 + r));
        end
      w0 = words_read;
      wait (ready);
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      while (!ready) begin
        @(posedge clk);
        if (dut.iss_cnt != dut.nwords && !mem_req) failures++;
      end
      checks++;
      if (words_read - w0 != nw * nh * 4 || exp_row.size() != 0) begin
        failures++;
        $display("mode M%0d: %0d words, %0d writes missing", m, words_read - w0, exp_row.size());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
