// Matrix of bit-serial luma interpolation filters for one 4x4 block.
//
// The 81 reference samples of a 9x9 window (the 4x4 block plus two samples
// of margin on the top/left and three on the bottom/right) are taken in
// parallel from the buffer on `start` and shifted out least significant bit
// first, all at once. 36 horizontal filters (4 per window row) give the
// horizontal half-sample values, 36 vertical filters (4 per window column)
// the vertical ones, and 16 second-stage filters run over the serial outputs
// of the horizontal filters to give the centre half-sample values. Every
// filter is a luma_serial_filter, so the whole 4x4 block is interpolated in
// one serial pass.
//
// The serial results are collected into parallel words; the output stage
// then rounds, clips and, for quarter-sample positions, averages two
// neighbours as H.264 requires, and sends the 16 predicted samples one per
// clock in raster order.
//
// Timing: `start` is accepted when `ready` is high. SER_CYCLES serial clocks
// follow, then 16 output clocks, so the last sample leaves 44 clocks after
// `start` with the defaults (28 + 16). The matrix and its filters follow the
// source architecture; the serial length, output order and interface are this
// design's choices. The source shares filter sections where horizontal and
// vertical filters use the same products; here all 72 first-stage filters
// are built in full, which changes area but not results.
module luma_filter_matrix
  import avc_inter_pkg::*;
#(
  parameter int unsigned SER_CYCLES = 28   // serial clocks per block, at least 22
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  sample_t  win [LUMA_TAPS],      // row-major 9x9 window
  input  logic [1:0] fx,                 // horizontal quarter-sample fraction
  input  logic [1:0] fy,                 // vertical quarter-sample fraction
  output logic     ready,
  output logic     out_valid,
  output sample_t  out_sample,
  output logic     out_last
);
  localparam int unsigned W1 = 16;  // first-stage result bits
  localparam int unsigned W2 = 20;  // second-stage result bits
  localparam int unsigned CW = $clog2(SER_CYCLES + 1);

  typedef enum logic [1:0] {S_IDLE, S_SER, S_OUT} state_e;
  state_e state;

  logic [CW-1:0] cnt;
  logic [3:0]    ocnt;
  logic [1:0]    fx_q, fy_q;
  sample_t       sh [LUMA_WIN][LUMA_WIN];    // serialising shift registers
  sample_t       full [5][5];                // integer samples near the block
  logic          bits [LUMA_WIN][LUMA_WIN];
  logic          first, first_j;

  // first-stage and second-stage serial outputs
  logic hbit [LUMA_WIN][4];
  logic vbit [4][LUMA_WIN];
  logic jbit [4][4];

  logic signed [W1-1:0] hq [LUMA_WIN][4];
  logic signed [W1-1:0] vq [4][LUMA_WIN];
  logic signed [W2-1:0] jq [4][4];

  assign first   = (state == S_SER) && (cnt == '0);
  assign first_j = (state == S_SER) && (cnt == CW'(1));
  assign ready   = (state == S_IDLE);

  always_comb
    for (int r = 0; r < int'(LUMA_WIN); r++)
      for (int c = 0; c < int'(LUMA_WIN); c++)
        bits[r][c] = sh[r][c][0];

  for (genvar r = 0; r < LUMA_WIN; r++) begin : g_hrow
    for (genvar x = 0; x < 4; x++) begin : g_h
      luma_serial_filter u_h (
        .clk, .first,
        .a(bits[r][x]),   .b(bits[r][x+1]), .c(bits[r][x+2]),
        .d(bits[r][x+3]), .e(bits[r][x+4]), .f(bits[r][x+5]),
        .y(hbit[r][x]));
    end
  end

  for (genvar y = 0; y < 4; y++) begin : g_vrow
    for (genvar c = 0; c < LUMA_WIN; c++) begin : g_v
      luma_serial_filter u_v (
        .clk, .first,
        .a(bits[y][c]),   .b(bits[y+1][c]), .c(bits[y+2][c]),
        .d(bits[y+3][c]), .e(bits[y+4][c]), .f(bits[y+5][c]),
        .y(vbit[y][c]));
    end
  end

  for (genvar y = 0; y < 4; y++) begin : g_jrow
    for (genvar x = 0; x < 4; x++) begin : g_j
      luma_serial_filter u_j (
        .clk, .first(first_j),
        .a(hbit[y][x]),   .b(hbit[y+1][x]), .c(hbit[y+2][x]),
        .d(hbit[y+3][x]), .e(hbit[y+4][x]), .f(hbit[y+5][x]),
        .y(jbit[y][x]));
    end
  end

  // control, serialisation and collection of results
  logic cap1, cap2;
  assign cap1 = (state == S_SER) && (cnt >= CW'(1)) && (cnt <= CW'(W1));
  assign cap2 = (state == S_SER) && (cnt >= CW'(2)) && (cnt <= CW'(W2 + 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      ocnt  <= '0;
      fx_q  <= '0;
      fy_q  <= '0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          state <= S_SER;
          cnt   <= '0;
          fx_q  <= fx;
          fy_q  <= fy;
        end
        S_SER: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(SER_CYCLES - 1)) begin
            state <= S_OUT;
            ocnt  <= '0;
          end
        end
        S_OUT: begin
          ocnt <= ocnt + 1'b1;
          if (ocnt == 4'd15) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state == S_IDLE && start) begin
      for (int r = 0; r < int'(LUMA_WIN); r++)
        for (int c = 0; c < int'(LUMA_WIN); c++)
          sh[r][c] <= win[r*LUMA_WIN + c];
      for (int r = 0; r < 5; r++)
        for (int c = 0; c < 5; c++)
          full[r][c] <= win[(r+2)*LUMA_WIN + c + 2];
    end else if (state == S_SER) begin
      for (int r = 0; r < int'(LUMA_WIN); r++)
        for (int c = 0; c < int'(LUMA_WIN); c++)
          sh[r][c] <= sh[r][c] >> 1;
    end
    if (cap1) begin
      for (int r = 0; r < int'(LUMA_WIN); r++)
        for (int x = 0; x < 4; x++) hq[r][x] <= {hbit[r][x], hq[r][x][W1-1:1]};
      for (int y = 0; y < 4; y++)
        for (int c = 0; c < int'(LUMA_WIN); c++) vq[y][c] <= {vbit[y][c], vq[y][c][W1-1:1]};
    end
    if (cap2)
      for (int y = 0; y < 4; y++)
        for (int x = 0; x < 4; x++) jq[y][x] <= {jbit[y][x], jq[y][x][W2-1:1]};
  end

  // output stage: rounding, clipping and quarter-sample averaging
  function automatic sample_t clip1(input logic signed [W2:0] v);
    if (v < 0)        return '0;
    else if (v > 255) return 8'd255;
    else              return sample_t'(v);
  endfunction

  function automatic sample_t avg(input sample_t p, input sample_t q);
    logic [8:0] s;
    s = ({1'b0, p} + {1'b0, q} + 9'd1) >> 1;
    return s[7:0];
  endfunction

  logic [2:0] ox, oy;
  sample_t g_s, h_s, m_s, b_s, s_s, hh_s, mm_s, j_s, pred;

  assign ox = {1'b0, ocnt[1:0]};
  assign oy = {1'b0, ocnt[3:2]};

  always_comb begin
    g_s  = full[oy][ox];                 // G: integer sample
    h_s  = full[oy][ox+1];               // integer sample to the right
    m_s  = full[oy+1][ox];               // integer sample below
    b_s  = clip1((W2+1)'(hq[oy+2][ocnt[1:0]]) + 16 >>> 5);       // horizontal half
    s_s  = clip1((W2+1)'(hq[oy+3][ocnt[1:0]]) + 16 >>> 5);       // horizontal half, next row
    hh_s = clip1((W2+1)'(vq[ocnt[3:2]][ox+2]) + 16 >>> 5);       // vertical half
    mm_s = clip1((W2+1)'(vq[ocnt[3:2]][ox+3]) + 16 >>> 5);       // vertical half, next column
    j_s  = clip1((W2+1)'(jq[ocnt[3:2]][ocnt[1:0]]) + 512 >>> 10);       // centre half
    case ({fx_q, fy_q})
      4'b00_00: pred = g_s;
      4'b00_01: pred = avg(g_s, hh_s);
      4'b00_10: pred = hh_s;
      4'b00_11: pred = avg(m_s, hh_s);
      4'b01_00: pred = avg(g_s, b_s);
      4'b01_01: pred = avg(b_s, hh_s);
      4'b01_10: pred = avg(hh_s, j_s);
      4'b01_11: pred = avg(hh_s, s_s);
      4'b10_00: pred = b_s;
      4'b10_01: pred = avg(b_s, j_s);
      4'b10_10: pred = j_s;
      4'b10_11: pred = avg(j_s, s_s);
      4'b11_00: pred = avg(h_s, b_s);
      4'b11_01: pred = avg(b_s, mm_s);
      4'b11_10: pred = avg(j_s, mm_s);
      default:  pred = avg(mm_s, s_s);
    endcase
  end

  assign out_valid  = (state == S_OUT);
  assign out_sample = pred;
  assign out_last   = (state == S_OUT) && (ocnt == 4'd15);

  initial assert (SER_CYCLES >= W2 + 2)
    else $error("SER_CYCLES must be at least %0d", W2 + 2);

endmodule
