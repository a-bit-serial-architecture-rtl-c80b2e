// Controller of the inter prediction module. It takes commands in order from
// the command queue and overlaps cache filling, buffer loading and filtering:
//  - FETCH starts the pre-fetch unit. It waits only while a buffer load is
//    reading cache blocks that the fetch would overwrite, so filling for the
//    next block overlaps both the window read and the filtering of the
//    current one.
//  - LUMA / CHROMA wait until all earlier fetches have landed, then read the
//    9x9 (luma) or 3x3 (chroma) window from the cache into the buffer, one
//    sample per clock (81 or 9 reads and one clock of read latency). For
//    chroma the weight unit runs at the same time. When both filters are
//    free the selected filter is started; it copies the buffer, and the next
//    command may reload the buffer while it filters.
// Starting a filter only when both are free keeps the output stream in
// command order. The dispatch rules and the handshake are this design's
// choices; the overlap of loading and filtering follows the source.
module inter_pred_ctrl
  import avc_inter_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // command queue
  input  logic       cmd_valid,
  input  inter_cmd_t cmd,
  output logic       cmd_ready,
  // pre-fetch unit
  output logic       pf_start,
  input  logic       pf_ready,
  // cache read port
  output logic       cache_re,
  output logic [4:0] cache_rx,
  output logic [4:0] cache_ry,
  // buffers (data comes straight from the cache read port)
  output logic       lbuf_we,
  output logic       cbuf_we,
  output logic [6:0] buf_widx,
  // filters
  output logic       luma_start,
  output logic [1:0] luma_fx,
  output logic [1:0] luma_fy,
  input  logic       luma_ready,
  output logic       wu_start,
  output logic [2:0] wu_fx,
  output logic [2:0] wu_fy,
  output logic       chroma_start,
  input  logic       chroma_ready
);
  typedef enum logic [1:0] {L_IDLE, L_READ, L_WAIT} lstate_e;
  lstate_e    lstate;
  logic       is_luma;
  logic [4:0] x0_q, y0_q;
  logic [3:0] col, row;          // window position being read
  logic [6:0] rd_idx;            // reads issued
  logic       rd_pend;           // a read is in flight
  logic [6:0] wr_idx;
  logic [2:0] fx_q, fy_q;
  logic [3:0] win;               // window side: 9 or 3
  logic [6:0] ntaps;

  // cache blocks touched by the window being read and by the fetch command,
  // as column and row masks over the 6x6 block grid (positions wrap)
  function automatic logic [5:0] span(input logic [2:0] first, input logic [2:0] n);
    logic [5:0] m;
    logic [2:0] b;
    m = '0;
    b = first;
    for (int k = 0; k < 4; k++) begin
      if (3'(k) < n) m[b] = 1'b1;
      b = (b == 3'd5) ? 3'd0 : b + 3'd1;
    end
    return m;
  endfunction

  function automatic logic [2:0] blk_of(input logic [4:0] p);
    logic [4:0] q;
    q = (p >= 5'd24) ? p - 5'd24 : p;
    return q[4:2];
  endfunction

  logic [5:0] win_cols, win_rows, f_cols, f_rows;
  logic       clash;
  logic [2:0] fw, fh;
  always_comb begin
    // a window of 9 (3) samples starting at offset o within a block spans
    // (o + 8) / 4 + 1 (or (o + 2) / 4 + 1) blocks
    win_cols = span(blk_of(x0_q), is_luma ? 3'(({1'b0, x0_q[1:0]} + 4'd8) >> 2) + 3'd1
                                          : 3'(({1'b0, x0_q[1:0]} + 3'd2) >> 2) + 3'd1);
    win_rows = span(blk_of(y0_q), is_luma ? 3'(({1'b0, y0_q[1:0]} + 4'd8) >> 2) + 3'd1
                                          : 3'(({1'b0, y0_q[1:0]} + 3'd2) >> 2) + 3'd1);
    fw = (cmd.mode == RD_M0 || cmd.mode == RD_M1) ? 3'd3 : 3'd1;
    fh = (cmd.mode == RD_M0 || cmd.mode == RD_M2) ? 3'd3 : 3'd1;
    f_cols = span(cmd.cx, fw);
    f_rows = span(cmd.cy, fh);
    clash  = |(win_cols & f_cols) && |(win_rows & f_rows);
  end

  logic accept;
  always_comb begin
    case (cmd.op)
      CMD_FETCH: cmd_ready = pf_ready && !(lstate == L_READ && clash);
      CMD_LUMA,
      CMD_CHROMA: cmd_ready = pf_ready && (lstate == L_IDLE);
      default:    cmd_ready = 1'b1;          // unknown commands are dropped
    endcase
  end
  assign accept   = cmd_valid && cmd_ready;
  assign pf_start = accept && (cmd.op == CMD_FETCH);

  assign win   = is_luma ? 4'(LUMA_WIN) : 4'(CHROMA_WIN);
  assign ntaps = is_luma ? 7'(LUMA_TAPS) : 7'(CHROMA_TAPS);

  assign cache_re = (lstate == L_READ) && (rd_idx != ntaps);
  assign cache_rx = x0_q + 5'(col);
  assign cache_ry = y0_q + 5'(row);

  assign lbuf_we  = rd_pend && is_luma;
  assign cbuf_we  = rd_pend && !is_luma;
  assign buf_widx = wr_idx;

  logic go;
  assign go           = (lstate == L_WAIT) && luma_ready && chroma_ready;
  assign luma_start   = go && is_luma;
  assign chroma_start = go && !is_luma;
  assign luma_fx      = fx_q[1:0];
  assign luma_fy      = fy_q[1:0];

  assign wu_start = accept && (cmd.op == CMD_CHROMA);
  assign wu_fx    = cmd.fx;
  assign wu_fy    = cmd.fy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lstate  <= L_IDLE;
      is_luma <= 1'b1;
      x0_q    <= '0;
      y0_q    <= '0;
      col     <= '0;
      row     <= '0;
      rd_idx  <= '0;
      wr_idx  <= '0;
      rd_pend <= 1'b0;
      fx_q    <= '0;
      fy_q    <= '0;
    end else begin
      rd_pend <= cache_re;
      if (rd_pend) wr_idx <= wr_idx + 1'b1;
      case (lstate)
        L_IDLE: if (accept && cmd.op != CMD_FETCH) begin
          lstate  <= L_READ;
          is_luma <= (cmd.op == CMD_LUMA);
          x0_q    <= cmd.x0;
          y0_q    <= cmd.y0;
          fx_q    <= cmd.fx;
          fy_q    <= cmd.fy;
          col     <= '0;
          row     <= '0;
          rd_idx  <= '0;
          wr_idx  <= '0;
        end
        L_READ: begin
          if (cache_re) begin
            rd_idx <= rd_idx + 1'b1;
            if (col == win - 1'b1) begin
              col <= '0;
              row <= row + 1'b1;
            end else begin
              col <= col + 1'b1;
            end
          end
          if (rd_idx == ntaps) lstate <= L_WAIT;   // last sample lands this clock
        end
        L_WAIT: if (go) lstate <= L_IDLE;
        default: lstate <= L_IDLE;
      endcase
    end
  end

endmodule
