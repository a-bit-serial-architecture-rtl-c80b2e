// Self-checking test of the cache-update planner. Every partition shape of
// H.264 (16x16, 16x8, 8x16, 8x8, 8x4, 4x8, 4x4) is planned for whole
// macroblocks at random positions with random motion vectors, with a
// randomly stalling consumer. A model of the cache contents checks that every
// 9x9 window of every 4x4 block holds exactly the reference samples the
// motion vector points to, and that the memory words fetched per macroblock
// equal the reference-sample counts of the data-transfer table (576, 768,
// 1024, 1536 and 2304 samples, i.e. 144 .. 576 words). The reading-mode
// order for an 8x8 partition (M0, then M2 and M1, then M3) and the
// pass-through of raw commands are checked too.
module tb_fetch_planner;
  import avc_inter_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, req_valid, req_ready, cmd_valid, cmd_ready;
  pred_req_t req;
  inter_cmd_t cmd;
  int checks = 0, failures = 0;

  fetch_planner dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // cache model: picture block held by each cache block (-1: none)
  int cpx[6][6], cpy[6][6];
  int words = 0, lumas = 0;
  int modes[$];
  pred_req_t cur;
  int bi_exp = 0, bj_exp = 0;
  int raw_seen = 0;
  logic expect_raw = 0;
  inter_cmd_t raw_cmd;

  always @(posedge clk) if (rst_n && cmd_valid && cmd_ready) begin
    if (expect_raw) begin
      checks++;
      if (cmd != raw_cmd) begin failures++; $display("raw command altered"); end
      raw_seen++;
    end else if (cmd.op == CMD_FETCH) begin
      int nw, nh;
      nw = (cmd.mode == RD_M0 || cmd.mode == RD_M1) ? 3 : 1;
      nh = (cmd.mode == RD_M0 || cmd.mode == RD_M2) ? 3 : 1;
      words += nw * nh * 4;
      modes.push_back(int'(cmd.mode));
      for (int dy = 0; dy < nh; dy++)
        for (int dx = 0; dx < nw; dx++) begin
          cpx[(cmd.cy + dy) % 6][(cmd.cx + dx) % 6] = int'(cmd.bx) + dx;
          cpy[(cmd.cy + dy) % 6][(cmd.cx + dx) % 6] = int'(cmd.by) + dy;
        end
    end else if (cmd.op == CMD_LUMA) begin
      int xs, ys, bad;
      xs = int'(cur.mb_x) * 16 + int'(cur.px4) * 4 + (int'(cur.mvx) >>> 2) - 2 + 4 * bi_exp;
      ys = int'(cur.mb_y) * 16 + int'(cur.py4) * 4 + (int'(cur.mvy) >>> 2) - 2 + 4 * bj_exp;
      bad = 0;
      for (int r = 0; r < 9; r++)
        for (int c = 0; c < 9; c++) begin
          int cxs, cys, px, py;
          cxs = (int'(cmd.x0) + c) % 24; cys = (int'(cmd.y0) + r) % 24;
          px = cpx[cys / 4][cxs / 4] * 4 + cxs % 4;
          py = cpy[cys / 4][cxs / 4] * 4 + cys % 4;
          if (px != xs + c || py != ys + r) bad++;
        end
      checks++;
      if (bad != 0 || int'(cmd.fx) != (int'(cur.mvx) & 3) || int'(cmd.fy) != (int'(cur.mvy) & 3)) begin
        failures++;
        if (failures < 10) $display("block (%0d,%0d): %0d window samples wrong", bi_exp, bj_exp, bad);
      end
      lumas++;
      bi_exp++;
      if (bi_exp == int'(cur.w4)) begin bi_exp = 0; bj_exp++; end
    end
  end

  always @(negedge clk) cmd_ready = ($urandom_range(0, 3) != 0);

  task automatic send(pred_req_t r);
    @(negedge clk);
    req_valid = 1; req = r;
    if (r.kind == REQ_PART) begin cur = r; bi_exp = 0; bj_exp = 0; end
    else begin expect_raw = 1; raw_cmd = r.raw; end
    #1;
    while (!req_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    @(negedge clk) req_valid = 0;
    // wait until the partition is fully planned
    while (dut.state != 0) @(negedge clk);
    @(negedge clk);
    expect_raw = 0;
  endtask

  initial begin
    int w4s[7] = '{4, 4, 2, 2, 2, 1, 1};
    int h4s[7] = '{4, 2, 4, 2, 1, 2, 1};
    int table_words[7] = '{144, 192, 192, 256, 384, 384, 576};
    rst_n = 0; req_valid = 0; req = '0;
    foreach (cpx[i, j]) begin cpx[i][j] = -1; cpy[i][j] = -1; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int s = 0; s < 7; s++) begin
      for (int rep = 0; rep < 6; rep++) begin
        int mbx, mby;
        mbx = $urandom_range(1, 43); mby = $urandom_range(1, 34);
        words = 0;
        modes.delete();
        for (int py = 0; py < 4; py += h4s[s])
          for (int px = 0; px < 4; px += w4s[s]) begin
            pred_req_t r;
            r = '0;
            r.kind = REQ_PART;
            r.mb_x = 6'(mbx); r.mb_y = 6'(mby);
            r.px4 = 2'(px); r.py4 = 2'(py);
            r.w4 = 3'(w4s[s]); r.h4 = 3'(h4s[s]);
            r.mvx = 14'($urandom_range(0, 120) - 60);
            r.mvy = 14'($urandom_range(0, 120) - 60);
            send(r);
          end
        checks++;
        if (words != table_words[s]) begin
          failures++;
          $display("partition %0dx%0d: %0d words per macroblock, expected %0d",
                   w4s[s] * 4, h4s[s] * 4, words, table_words[s]);
        end
        if (s == 3) begin
          checks++;
          if (modes.size() != 16 || modes[0] != 0 || modes[1] != 2 || modes[2] != 1 || modes[3] != 3) begin
            failures++;
            $display("8x8 reading modes %p", modes);
          end
        end
      end
    end
    // raw pass-through
    for (int t = 0; t < 10; t++) begin
      pred_req_t r;
      r = '0;
      r.kind = REQ_RAW;
      r.raw.op = CMD_CHROMA; r.raw.x0 = 5'(t); r.raw.fx = 3'(t % 8);
      send(r);
    end
    checks++;
    if (raw_seen != 10) begin failures++; $display("raw commands passed: %0d", raw_seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
