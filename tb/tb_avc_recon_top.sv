// End-to-end test of the reconstruction block at its default parameters
// (720x576 picture). Whole macroblocks of every partition shape with random
// motion vectors go through the command FIFO, the planner, the inter
// prediction module and the output stage; chroma blocks are sent as raw
// commands; intra samples are sent with the multiplexer switched to intra.
// Each reconstructed sample is compared with clip(reference prediction +
// prediction error), the reference prediction computed directly from the
// test picture. The coefficient FIFO is checked for order. The output is
// stalled at random so the prediction FIFO fills and the credit check holds
// commands back. Counted and required at least once: each reading mode, luma
// and chroma filtering, credit stalls, memory stalls, clipping at 0 and 255,
// intra selection, a full coefficient FIFO. The time for one 16x16
// macroblock (request to last luma sample) is reported.
module tb_avc_recon_top;
  import avc_inter_pkg::*;
  import luma_ref_pkg::*;
  import frame_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  logic req_valid, req_ready;
  pred_req_t req;
  logic coef_in_valid, coef_in_ready, coef_out_valid, coef_out_ready;
  logic [15:0] coef_in, coef_out;
  logic res_valid, res_ready;
  logic signed [9:0] res;
  logic intra_valid, intra_ready, sel_intra;
  sample_t intra_sample, rec_sample;
  logic mem_req, mem_gnt, mem_rvalid;
  logic [17:0] mem_addr;
  logic [31:0] mem_rdata;
  logic rec_valid, rec_ready;
  int words_read;
  int checks = 0, failures = 0;

  avc_recon_top dut (.*);
  frame_ram_model #(.ADDR_W(18), .LAT(4), .STALL_PCT(10)) u_ram (
    .clk, .rst_n, .req(mem_req), .addr(mem_addr), .gnt(mem_gnt),
    .rvalid(mem_rvalid), .rdata(mem_rdata), .words_read);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int predq[$];       // expected predictions in output order
  int resq[$];        // prediction errors in the order they were consumed
  int coefq[$];
  int n_mode[4], n_luma = 0, n_chroma = 0, n_credit = 0, n_memstall = 0;
  int n_clip0 = 0, n_clip255 = 0, n_intra = 0, n_coef_full = 0, n_rec = 0;
  int rec_count = 0;
  int n_luma_done = 0;
  logic hold_out = 0;

  // prediction errors: always offered, random values, sometimes large
  always @(negedge clk) begin
    res_valid = ($urandom_range(0, 7) != 0);
    res = ($urandom_range(0, 9) == 0) ? 10'($signed($urandom_range(0, 510)) - 255)
                                      : 10'($signed($urandom_range(0, 40)) - 20);
    rec_ready = !hold_out && ($urandom_range(0, 99) < 60);
    coef_out_ready = ($urandom_range(0, 99) < 30);
  end

  always @(posedge clk) if (rst_n) begin
    if (res_valid && res_ready) resq.push_back(int'(res));
    if (dut.u_inter.cmd_valid && dut.u_inter.cmd_ready && dut.u_inter.cmd.op == CMD_FETCH)
      n_mode[dut.u_inter.cmd.mode]++;
    if (dut.u_inter.cmd_valid && dut.u_inter.cmd_ready && dut.u_inter.cmd.op == CMD_LUMA) n_luma++;
    if (dut.u_inter.cmd_valid && dut.u_inter.cmd_ready && dut.u_inter.cmd.op == CMD_CHROMA) n_chroma++;
    if (dut.pl_valid && dut.pl_cmd.op != CMD_FETCH && !dut.room) n_credit++;
    if (mem_req && !mem_gnt) n_memstall++;
    if (intra_valid && intra_ready) n_intra++;
    if (dut.u_inter.out_valid && dut.u_inter.out_last && !dut.u_inter.out_chroma) n_luma_done++;
    if (coef_in_valid && !coef_in_ready) n_coef_full++;
    if (coef_out_valid && coef_out_ready) begin
      checks++;
      if (coefq.size() == 0 || int'(coef_out) != coefq[0]) begin
        failures++; $display("coefficient FIFO order broken");
      end
      if (coefq.size()) void'(coefq.pop_front());
    end
    if (rec_valid && rec_ready) begin
      int p, r, s;
      checks++;
      rec_count++;
      if (predq.size() == 0 || resq.size() == 0) begin
        failures++; $display("unexpected reconstructed sample");
      end else begin
        p = predq.pop_front(); r = resq.pop_front();
        s = p + r;
        if (s < 0) n_clip0++;
        if (s > 255) n_clip255++;
        s = (s < 0) ? 0 : (s > 255) ? 255 : s;
        if (int'(rec_sample) != s) begin
          failures++;
          if (failures < 10) $display("sample %0d: got %0d expected %0d (pred %0d, error %0d)",
                                      rec_count, rec_sample, s, p, r);
        end
      end
    end
  end

  task automatic push_req(pred_req_t r);
    @(negedge clk);
    req_valid = 1; req = r;
    #1;
    while (!req_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    @(negedge clk) req_valid = 0;
  endtask

  // one luma partition: request and expected predictions
  task automatic luma_part(int mbx, int mby, int px, int py, int w4, int h4, int mvx, int mvy);
    pred_req_t r;
    int win[81];
    r = '0;
    r.kind = REQ_PART; r.mb_x = 6'(mbx); r.mb_y = 6'(mby);
    r.px4 = 2'(px); r.py4 = 2'(py); r.w4 = 3'(w4); r.h4 = 3'(h4);
    r.mvx = 14'(mvx); r.mvy = 14'(mvy);
    for (int bj = 0; bj < h4; bj++)
      for (int bi = 0; bi < w4; bi++) begin
        int xs, ys;
        xs = mbx * 16 + (px + bi) * 4 + (mvx >>> 2) - 2;
        ys = mby * 16 + (py + bj) * 4 + (mvy >>> 2) - 2;
        for (int k = 0; k < 81; k++) win[k] = sample_at(0, xs + k % 9, ys + k / 9);
        for (int n = 0; n < 16; n++) predq.push_back(luma_pred(win, mvx & 3, mvy & 3, n % 4, n / 4));
      end
    push_req(r);
  endtask

  // a 2x2 chroma block: fetch 3x3 blocks and filter at (x0,y0)
  task automatic chroma_blk(int plane, int bx, int by, int x0, int y0, int fx, int fy);
    pred_req_t r;
    int s[9];
    r = '0;
    r.kind = REQ_RAW;
    r.raw.op = CMD_FETCH; r.raw.mode = RD_M0; r.raw.plane = plane_e'(plane);
    r.raw.bx = 8'(bx); r.raw.by = 8'(by);
    push_req(r);
    r.raw = '0;
    r.raw.op = CMD_CHROMA; r.raw.x0 = 5'(x0); r.raw.y0 = 5'(y0); r.raw.fx = 3'(fx); r.raw.fy = 3'(fy);
    for (int i = 0; i < 9; i++) s[i] = sample_at(plane, bx * 4 + x0 + i % 3, by * 4 + y0 + i / 3);
    for (int n = 0; n < 4; n++) begin
      int ox, oy;
      ox = n % 2; oy = n / 2;
      predq.push_back(((8-fx)*(8-fy)*s[oy*3+ox] + fx*(8-fy)*s[oy*3+ox+1] +
                       (8-fx)*fy*s[(oy+1)*3+ox] + fx*fy*s[(oy+1)*3+ox+1] + 32) >> 6);
    end
    push_req(r);
  endtask

  task automatic drain();
    while (predq.size() > 0) @(posedge clk);
    repeat (4) @(posedge clk);
  endtask

  initial begin
    int w4s[7] = '{4, 4, 2, 2, 2, 1, 1};
    int h4s[7] = '{4, 2, 4, 2, 1, 2, 1};
    int t0, t1, mb_clocks;
    rst_n = 0; req_valid = 0; req = '0; coef_in_valid = 0; coef_in = 0;
    intra_valid = 0; intra_sample = 0; sel_intra = 0;
    foreach (n_mode[m]) n_mode[m] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // coefficient queue, filled faster than it drains
    fork
      for (int i = 0; i < 200; i++) begin
        @(negedge clk);
        coef_in_valid = 1; coef_in = 16'($urandom);
        #1;
        while (!coef_in_ready) begin @(negedge clk); #1; end
        coefq.push_back(int'(coef_in));
        @(posedge clk);
        @(negedge clk) coef_in_valid = 0;
      end
    join_none

    // one 16x16 macroblock, timed
    t0 = $time;
    luma_part(10, 8, 0, 0, 4, 4, 13, -7);
    while (n_luma_done < 16) @(posedge clk);
    t1 = $time;
    mb_clocks = (t1 - t0) / 10;
    $display("16x16 macroblock: %0d clocks from request to last prediction sample", mb_clocks);
    drain();

    // output held: the prediction FIFO fills and the credit check must hold
    // filter commands back without losing samples
    hold_out = 1;
    luma_part(20, 20, 0, 0, 4, 4, 6, 9);
    repeat (1500) @(posedge clk);
    hold_out = 0;
    drain();

    // every partition shape, two macroblocks each
    for (int s = 0; s < 7; s++)
      for (int rep = 0; rep < 2; rep++) begin
        int mbx, mby;
        mbx = $urandom_range(1, 42); mby = $urandom_range(1, 33);
        for (int py = 0; py < 4; py += h4s[s])
          for (int px = 0; px < 4; px += w4s[s])
            luma_part(mbx, mby, px, py, w4s[s], h4s[s],
                      $urandom_range(0, 100) - 50, $urandom_range(0, 100) - 50);
      end

    // chroma blocks in both planes
    for (int t = 0; t < 8; t++)
      chroma_blk(1 + t % 2, $urandom_range(0, 80), $urandom_range(0, 60),
                 $urandom_range(0, 9), $urandom_range(0, 9), $urandom_range(0, 7), $urandom_range(0, 7));
    drain();

    // intra prediction through the multiplexer
    @(negedge clk) sel_intra = 1;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      intra_valid = 1; intra_sample = sample_t'((i % 2) ? 250 : 3);
      predq.push_back(int'(intra_sample));
      #1;
      while (!intra_ready) begin @(negedge clk); #1; end
      @(posedge clk);
      @(negedge clk) intra_valid = 0;
    end
    drain();
    @(negedge clk) sel_intra = 0;
    repeat (3000) @(posedge clk);   // let the coefficient queue drain

    checks++;
    if (predq.size() != 0 || coefq.size() != 0) begin
      failures++; $display("left over: %0d predictions, %0d coefficients", predq.size(), coefq.size());
    end
    foreach (n_mode[m]) begin
      checks++;
      if (n_mode[m] == 0) begin failures++; $display("reading mode M%0d never used", m); end
    end
    checks++; if (n_luma == 0)      begin failures++; $display("no luma block"); end
    checks++; if (n_chroma == 0)    begin failures++; $display("no chroma block"); end
    checks++; if (n_credit == 0)    begin failures++; $display("credit check never held a command"); end
    checks++; if (n_memstall == 0)  begin failures++; $display("memory never stalled"); end
    checks++; if (n_clip0 == 0)     begin failures++; $display("never clipped at 0"); end
    checks++; if (n_clip255 == 0)   begin failures++; $display("never clipped at 255"); end
    checks++; if (n_intra != 16)    begin failures++; $display("intra samples taken: %0d", n_intra); end
    checks++; if (n_coef_full == 0) begin failures++; $display("coefficient FIFO never full"); end
    $display("modes M0..M3 %0d %0d %0d %0d, luma %0d, chroma %0d, credit stalls %0d, memory stalls %0d, clips %0d/%0d, words %0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_luma, n_chroma, n_credit, n_memstall,
             n_clip0, n_clip255, words_read);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
