// Self-checking test of the controller with simple models of the pre-fetch
// unit (busy for a random time after each start) and of the two filters
// (busy for 44 / 20 clocks after a start). Checked: every window read visits
// the 9x9 or 3x3 cache positions in raster order from (x0,y0); buffer writes
// follow one clock later with indices 0..N-1; a filter is started only after
// its last buffer write and only when both filters are free; a window read
// never starts while a fetch is in progress, and while a fetch runs no cache
// read touches a block that the fetch is writing; fetches do start during
// window reads when their blocks are disjoint; a window read takes exactly
// 81 (or 9) read clocks.
module tb_inter_pred_ctrl;
  import avc_inter_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, cmd_valid, cmd_ready, pf_start, pf_ready, cache_re, lbuf_we, cbuf_we;
  logic luma_start, luma_ready, wu_start, chroma_start, chroma_ready;
  inter_cmd_t cmd;
  logic [4:0] cache_rx, cache_ry;
  logic [6:0] buf_widx;
  logic [1:0] luma_fx, luma_fy;
  logic [2:0] wu_fx, wu_fy;
  int checks = 0, failures = 0;

  inter_pred_ctrl dut (.*);

  // models
  int pf_left = 0, l_left = 0, c_left = 0;
  assign pf_ready = (pf_left == 0);
  assign luma_ready = (l_left == 0);
  assign chroma_ready = (c_left == 0);
  always @(posedge clk) begin
    if (pf_start) pf_left <= $urandom_range(4, 40); else if (pf_left > 0) pf_left <= pf_left - 1;
    if (luma_start) l_left <= 44; else if (l_left > 0) l_left <= l_left - 1;
    if (chroma_start) c_left <= 20; else if (c_left > 0) c_left <= c_left - 1;
  end

  // expected window reads
  inter_cmd_t wq[$];
  int rd_n = 0, wr_n = 0, reads_in_win = 0, starts_l = 0, starts_c = 0, fetches = 0, overlap = 0;
  int read_fetch = 0;
  logic wr_pend = 0;
  inter_cmd_t fcmd;

  // true when cache position (x, y) lies in a block written by fetch f
  function automatic bit in_fetch(inter_cmd_t f, int x, int y);
    int bx = (x % 24) / 4, by = (y % 24) / 4;
    int nw = (f.mode == RD_M0 || f.mode == RD_M1) ? 3 : 1;
    int nh = (f.mode == RD_M0 || f.mode == RD_M2) ? 3 : 1;
    int dx = (bx - int'(f.cx) + 6) % 6, dy = (by - int'(f.cy) + 6) % 6;
    return dx < nw && dy < nh;
  endfunction
  always @(posedge clk) if (rst_n) begin
    wr_pend <= cache_re;
    if (pf_start) begin
      fetches++;
      fcmd = cmd;
      if (dut.lstate == 1) read_fetch++;
    end
    if (cache_re) begin
      int win, ex, ey;
      checks++;
      if (!pf_ready && rd_n == 0) begin failures++; $display("window read started during a fetch"); end
      if (!pf_ready && in_fetch(fcmd, cache_rx, cache_ry)) begin
        failures++; $display("read (%0d,%0d) inside the running fetch", cache_rx, cache_ry);
      end
      if (wq.size() == 0) begin failures++; $display("read without command"); end
      else begin
        win = (wq[0].op == CMD_LUMA) ? 9 : 3;
        ex = wq[0].x0 + rd_n % win; ey = wq[0].y0 + rd_n / win;
        if (int'(cache_rx) != ex || int'(cache_ry) != ey) begin
          failures++;
          if (failures < 10) $display("read %0d at (%0d,%0d) expected (%0d,%0d)", rd_n, cache_rx, cache_ry, ex, ey);
        end
        rd_n++;
      end
    end
    if (lbuf_we || cbuf_we) begin
      checks++;
      if (!wr_pend || int'(buf_widx) != wr_n || (lbuf_we != (wq[0].op == CMD_LUMA))) begin
        failures++;
        if (failures < 10) $display("buffer write %0d index %0d", wr_n, buf_widx);
      end
      wr_n++;
    end
    if (luma_start || chroma_start) begin
      checks++;
      if (!luma_ready || !chroma_ready || wq.size() == 0 ||
          wr_n != ((wq[0].op == CMD_LUMA) ? 81 : 9) || rd_n != wr_n ||
          luma_start != (wq[0].op == CMD_LUMA)) begin
        failures++;
        $display("bad filter start after %0d writes", wr_n);
      end
      if (luma_start && (luma_fx != wq[0].fx[1:0] || luma_fy != wq[0].fy[1:0])) failures++;
      if (luma_start) starts_l++; else starts_c++;
      void'(wq.pop_front());
      rd_n = 0; wr_n = 0;
    end
    if (!pf_ready && (!luma_ready || !chroma_ready)) overlap++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nl = 0, nc = 0;
    rst_n = 0; cmd_valid = 0; cmd = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      automatic inter_cmd_t c = '0;
      automatic int k = $urandom_range(0, 2);
      c.op = cmd_op_e'(k);
      c.mode = rd_mode_e'($urandom_range(0, 3));
      c.x0 = 5'($urandom_range(0, 23)); c.y0 = 5'($urandom_range(0, 23));
      c.cx = 3'($urandom_range(0, 5)); c.cy = 3'($urandom_range(0, 5));
      c.fx = 3'($urandom_range(0, 7)); c.fy = 3'($urandom_range(0, 7));
      if (c.op == CMD_LUMA) begin c.fx[2] = 0; c.fy[2] = 0; nl++; end
      if (c.op == CMD_CHROMA) nc++;
      @(negedge clk); cmd_valid = 1; cmd = c;
      #1;
      while (!cmd_ready) begin @(negedge clk); #1; end
      // accepted at the coming edge
      if (c.op != CMD_FETCH) wq.push_back(c);
      if (c.op == CMD_CHROMA) begin
        checks++;
        if (!wu_start || wu_fx != c.fx || wu_fy != c.fy) begin failures++; $display("weight unit not started"); end
      end
      @(posedge clk);
      @(negedge clk) cmd_valid = 0;
    end
    repeat (300) @(posedge clk);
    checks++;
    if (starts_l != nl || starts_c != nc) begin
      failures++; $display("filter starts %0d/%0d, expected %0d/%0d", starts_l, starts_c, nl, nc);
    end
    checks++;
    if (overlap == 0) begin failures++; $display("fetch never overlapped filtering"); end
    checks++;
    if (read_fetch == 0) begin failures++; $display("fetch never overlapped a window read"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
