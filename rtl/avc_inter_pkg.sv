// Shared types and constants of the bit-serial H.264/AVC inter prediction
// module. Samples are 8-bit unsigned. The local cache is a 24x24-sample
// window (6x6 blocks of 4x4 samples) onto a reference picture that is held
// in external memory as 32-bit words, four samples per word, each 4x4 block
// stored as four consecutive words (one per row). The command format below
// is this design's own: the source architecture names a command FIFO that
// carries prediction modes and motion vectors but gives no encoding.
package avc_inter_pkg;

  localparam int unsigned SAMPLE_W    = 8;
  localparam int unsigned CACHE_BLK   = 6;              // cache is 6x6 blocks
  localparam int unsigned CACHE_DIM   = 4 * CACHE_BLK;  // 24 samples
  localparam int unsigned LUMA_WIN    = 9;              // 9x9 reference window
  localparam int unsigned LUMA_TAPS   = LUMA_WIN * LUMA_WIN;  // 81 samples
  localparam int unsigned CHROMA_WIN  = 3;              // 3x3 reference window
  localparam int unsigned CHROMA_TAPS = CHROMA_WIN * CHROMA_WIN;  // 9 samples

  typedef logic [SAMPLE_W-1:0] sample_t;

  // Memory reading modes (cache update patterns) of the pre-fetch unit.
  //   M0: 3x3 blocks (a 4x4 block and its surrounding)
  //   M1: a row of 3 blocks
  //   M2: a column of 3 blocks
  //   M3: a single block
  typedef enum logic [1:0] {
    RD_M0 = 2'd0,
    RD_M1 = 2'd1,
    RD_M2 = 2'd2,
    RD_M3 = 2'd3
  } rd_mode_e;

  typedef enum logic [1:0] {
    CMD_FETCH  = 2'd0,  // move blocks from external memory into the cache
    CMD_LUMA   = 2'd1,  // interpolate one 4x4 luma block from the cache
    CMD_CHROMA = 2'd2   // interpolate one 2x2 chroma block from the cache
  } cmd_op_e;

  typedef enum logic [1:0] {
    PLANE_Y  = 2'd0,
    PLANE_CB = 2'd1,
    PLANE_CR = 2'd2
  } plane_e;

  // One command of the command FIFO.
  //   FETCH : mode, plane, frame block position (bx,by), cache block position (cx,cy)
  //   LUMA  : top-left cache sample (x0,y0) of the 9x9 window, quarter-pel fraction (fx,fy) 0..3
  //   CHROMA: top-left cache sample (x0,y0) of the 3x3 window, eighth-pel fraction (fx,fy) 0..7
  typedef struct packed {
    cmd_op_e     op;
    rd_mode_e    mode;
    plane_e      plane;
    logic [7:0]  bx;
    logic [7:0]  by;
    logic [2:0]  cx;
    logic [2:0]  cy;
    logic [4:0]  x0;
    logic [4:0]  y0;
    logic [2:0]  fx;
    logic [2:0]  fy;
  } inter_cmd_t;

  localparam int unsigned CMD_W = $bits(inter_cmd_t);

  // One entry of the command FIFO of the reconstruction block.
  //   REQ_PART: predict a luma partition of a macroblock; the fetch planner
  //             turns it into FETCH and LUMA commands
  //   REQ_RAW : an inter_cmd_t passed through unchanged (e.g. chroma work)
  typedef enum logic {
    REQ_PART = 1'b0,
    REQ_RAW  = 1'b1
  } req_kind_e;

  typedef struct packed {
    req_kind_e          kind;
    logic [5:0]         mb_x;     // macroblock column
    logic [5:0]         mb_y;     // macroblock row
    logic [1:0]         px4;      // partition position in 4-sample units
    logic [1:0]         py4;
    logic [2:0]         w4;       // partition size in 4-sample units: 1, 2 or 4
    logic [2:0]         h4;
    logic signed [13:0] mvx;      // motion vector, quarter samples
    logic signed [13:0] mvy;
    inter_cmd_t         raw;
  } pred_req_t;

endpackage
