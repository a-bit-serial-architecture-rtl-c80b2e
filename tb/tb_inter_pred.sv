// End-to-end test of the inter prediction module against the memory model.
// A command stream mixes every reading mode (M0..M3), luma blocks at all 16
// quarter-sample positions and chroma blocks at random eighth-sample
// positions, in both chroma planes. Every predicted sample is compared with
// the reference interpolation of the test picture. Also checked: the number
// of memory words each reading mode fetches, the latency of an isolated luma
// block (81 cache reads + 44 filter/output clocks, plus the hand-over clocks
// of this implementation) and that cache filling overlapped filtering.
module tb_inter_pred;
  import avc_inter_pkg::*;
  import luma_ref_pkg::*;
  import frame_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, cmd_valid, cmd_ready;
  inter_cmd_t cmd;
  logic mem_req, mem_gnt, mem_rvalid;
  logic [17:0] mem_addr;
  logic [31:0] mem_rdata;
  logic out_valid, out_last, out_chroma, busy;
  sample_t out_sample;
  int words_read;
  int checks = 0, failures = 0;

  inter_pred dut (.*);
  frame_ram_model #(.ADDR_W(18), .LAT(4), .STALL_PCT(20)) u_ram (
    .clk, .rst_n, .req(mem_req), .addr(mem_addr), .gnt(mem_gnt),
    .rvalid(mem_rvalid), .rdata(mem_rdata), .words_read);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  inter_cmd_t cmdq[$];
  int         expq[$];       // expected samples, chroma flag in bit 8
  int         mode_cnt[4];
  int         overlap_cnt = 0;

  // picture position held in each cache block: plane, block x, block y
  int cache_px[6][6], cache_py[6][6];

  function automatic inter_cmd_t mk_fetch(rd_mode_e m, plane_e p, int bx, int by, int cx, int cy);
    inter_cmd_t c = '0;
    c.op = CMD_FETCH; c.mode = m; c.plane = p;
    c.bx = 8'(bx); c.by = 8'(by); c.cx = 3'(cx); c.cy = 3'(cy);
    return c;
  endfunction

  // record which picture blocks the fetch puts where (for expected values)
  function automatic void note_fetch(inter_cmd_t c);
    int nw, nh;
    nw = (c.mode == RD_M0 || c.mode == RD_M1) ? 3 : 1;
    nh = (c.mode == RD_M0 || c.mode == RD_M2) ? 3 : 1;
    for (int dy = 0; dy < nh; dy++)
      for (int dx = 0; dx < nw; dx++) begin
        cache_px[(c.cy + dy) % 6][(c.cx + dx) % 6] = (c.bx + dx) * 4;
        cache_py[(c.cy + dy) % 6][(c.cx + dx) % 6] = (c.by + dy) * 4;
      end
  endfunction

  function automatic int cached(int plane, int x, int y);
    x = x % 24; y = y % 24;
    return sample_at(plane, cache_px[y/4][x/4] + x % 4, cache_py[y/4][x/4] + y % 4);
  endfunction

  function automatic void add_luma(int x0, int y0, int fx, int fy);
    inter_cmd_t c = '0;
    int w[81];
    c.op = CMD_LUMA; c.x0 = 5'(x0); c.y0 = 5'(y0); c.fx = 3'(fx); c.fy = 3'(fy);
    cmdq.push_back(c);
    for (int i = 0; i < 81; i++) w[i] = cached(0, x0 + i % 9, y0 + i / 9);
    for (int n = 0; n < 16; n++) expq.push_back(luma_pred(w, fx, fy, n % 4, n / 4));
  endfunction

  function automatic void add_chroma(int plane, int x0, int y0, int fx, int fy);
    inter_cmd_t c = '0;
    int s[9];
    c.op = CMD_CHROMA; c.x0 = 5'(x0); c.y0 = 5'(y0); c.fx = 3'(fx); c.fy = 3'(fy);
    cmdq.push_back(c);
    for (int i = 0; i < 9; i++) s[i] = cached(plane, x0 + i % 3, y0 + i / 3);
    for (int n = 0; n < 4; n++) begin
      int ox = n % 2, oy = n / 2;
      expq.push_back(256 + (((8-fx)*(8-fy)*s[oy*3+ox] + fx*(8-fy)*s[oy*3+ox+1] +
                             (8-fx)*fy*s[(oy+1)*3+ox] + fx*fy*s[(oy+1)*3+ox+1] + 32) >> 6));
    end
  endfunction

  function automatic void add_fetch(rd_mode_e m, plane_e p, int bx, int by, int cx, int cy);
    inter_cmd_t c = mk_fetch(m, p, bx, by, cx, cy);
    cmdq.push_back(c);
    note_fetch(c);
  endfunction

  // output monitor
  int got_cnt = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    int e;
    checks++;
    if (expq.size() == 0) begin
      failures++;
      $display("unexpected output sample");
    end else begin
      e = expq.pop_front();
      if ((e >> 8) != int'(out_chroma) || (e & 255) != int'(out_sample)) begin
        failures++;
        if (failures < 10)
          $display("output %0d: got %0d (chroma %0d) expected %0d (chroma %0d)",
                   got_cnt, out_sample, out_chroma, e & 255, e >> 8);
      end
    end
    got_cnt++;
  end

  // overlap of cache filling with filtering
  always @(posedge clk)
    if (rst_n && mem_rvalid && (!dut.luma_ready || !dut.chroma_ready)) overlap_cnt++;

  task automatic run_queue();
    while (cmdq.size() > 0) begin
      @(negedge clk);
      cmd_valid = 1; cmd = cmdq[0];
      #1;
      if (cmd_ready) begin          // accepted at the coming edge
        if (cmdq[0].op == CMD_FETCH) mode_cnt[cmdq[0].mode]++;
        void'(cmdq.pop_front());
      end
      @(posedge clk);
    end
    @(negedge clk) cmd_valid = 0;
    while (busy || expq.size() > 0) @(posedge clk);
  endtask

  initial begin
    int w0, t0, lat;
    rst_n = 0; cmd_valid = 0; cmd = '0;
    foreach (cache_px[i, j]) begin cache_px[i][j] = 0; cache_py[i][j] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // 1. words fetched per reading mode
    foreach (mode_cnt[m]) mode_cnt[m] = 0;
    for (int m = 0; m < 4; m++) begin
      w0 = words_read;
      add_fetch(rd_mode_e'(m), PLANE_Y, 10 + m, 20, 0, 0);
      run_queue();
      checks++;
      if (words_read - w0 != ((m == 0) ? 36 : (m == 3) ? 4 : 12)) begin
        failures++;
        $display("mode M%0d fetched %0d words", m, words_read - w0);
      end
    end

    // 2. isolated luma block latency
    add_fetch(RD_M0, PLANE_Y, 30, 40, 0, 0);
    run_queue();
    add_luma(1, 2, 2, 2);
    @(negedge clk); cmd_valid = 1; cmd = cmdq[0];
    t0 = 0;
    @(posedge clk); #1; void'(cmdq.pop_front());   // controller idle: accepted
    @(negedge clk) cmd_valid = 0;
    lat = 1;
    while (expq.size() > 0) begin @(posedge clk); #1; lat++; end
    checks++;
    $display("isolated luma block: %0d clocks from command to last sample", lat);
    if (lat != 128) begin failures++; $display("expected 128 clocks"); end

    // 3. random luma blocks, every quarter-sample position, every mode combination
    for (int t = 0; t < 48; t++) begin
      automatic int bx = $urandom_range(0, 170), by = $urandom_range(0, 130);
      automatic int q = $urandom_range(0, 3);
      automatic int cx = (q % 2) * 3, cy = (q / 2) * 3;
      add_fetch(RD_M0, PLANE_Y, bx, by, cx, cy);
      add_luma(cx*4 + $urandom_range(0, 3), cy*4 + $urandom_range(0, 3), t % 4, (t / 4) % 4);
      if (t % 3 == 0) begin
        // grow the region to 4x4 blocks with M1, M2 and M3 (an 8x8 partition)
        add_fetch(RD_M1, PLANE_Y, bx, by + 3, cx, cy + 3);
        add_fetch(RD_M2, PLANE_Y, bx + 3, by, cx + 3, cy);
        add_fetch(RD_M3, PLANE_Y, bx + 3, by + 3, cx + 3, cy + 3);
        add_luma(cx*4 + 4 + $urandom_range(0, 3), cy*4 + 4 + $urandom_range(0, 3),
                 $urandom_range(0, 3), $urandom_range(0, 3));
      end
    end
    run_queue();

    // 4. chroma blocks in both planes
    for (int t = 0; t < 24; t++) begin
      automatic int bx = $urandom_range(0, 85), by = $urandom_range(0, 68);
      automatic plane_e p = (t % 2) ? PLANE_CR : PLANE_CB;
      add_fetch(RD_M0, p, bx, by, 0, 0);
      add_chroma(int'(p), $urandom_range(0, 9), $urandom_range(0, 9),
                 $urandom_range(0, 7), $urandom_range(0, 7));
    end
    run_queue();

    for (int m = 0; m < 4; m++) begin
      checks++;
      if (mode_cnt[m] == 0) begin failures++; $display("mode M%0d never used", m); end
    end
    checks++;
    if (overlap_cnt == 0) begin failures++; $display("fetch never overlapped filtering"); end
    $display("fetches per mode: M0 %0d M1 %0d M2 %0d M3 %0d, overlapped fill clocks %0d",
             mode_cnt[0], mode_cnt[1], mode_cnt[2], mode_cnt[3], overlap_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
