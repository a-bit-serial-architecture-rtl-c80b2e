// Cache-update planner: turns a luma partition of a macroblock (position,
// size, motion vector) into the commands of the inter prediction module.
//
// A partition of w x h 4x4 blocks whose reference starts at integer sample
// (X, Y) needs the reference blocks from floor((X-2)/4) over w+2 columns and
// h+2 rows. That region is tiled with the reading modes: a side of 3 blocks
// is one segment, 4 blocks are 3 + 1 and 6 blocks are 3 + 3; a 3x3 tile is
// read with M0, 3x1 with M1, 1x3 with M2 and 1x1 with M3. The 4x4 blocks of
// the partition are then filtered in raster order; before each one, only the
// tiles its 9x9 window touches and that have not been read yet are fetched,
// so filling for later blocks overlaps the filtering of earlier ones. For an
// 8x8 partition this gives M0, then M2 and M1, then M3.
//
// Partitions are placed in the 24x24 cache at block (3*(px4%2), 3*(py4%2)),
// so neighbouring small partitions use different quarters of the cache.
// REQ_RAW entries are passed through unchanged. Motion vectors are assumed
// to keep the region inside the picture (no edge extension).
//
// Timing: one command per clock while the consumer is ready. The tiling and
// the reading modes follow the source architecture; the tile order, cache
// placement and interfaces are this design's choices.
module fetch_planner
  import avc_inter_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       req_valid,
  input  pred_req_t  req,
  output logic       req_ready,
  output logic       cmd_valid,
  output inter_cmd_t cmd,
  input  logic       cmd_ready
);
  typedef enum logic [1:0] {P_IDLE, P_FETCH, P_LUMA} pstate_e;
  pstate_e state;

  pred_req_t  r_q;
  logic [2:0] bi, bj;              // current 4x4 block within the partition
  logic [3:0] fetched;             // tiles read so far, index {sy, sx}
  logic [1:0] tile;                // tile being considered in P_FETCH
  logic signed [15:0] xs, ys;      // window origin (X-2, Y-2) of block (0,0)
  logic [7:0] rbx, rby;            // region origin, picture blocks
  logic [1:0] offx, offy;          // window origin within its block
  logic [2:0] cx0, cy0;            // region origin, cache blocks

  always_comb begin
    xs   = $signed(16'({r_q.mb_x, 4'b0000}) + 16'({r_q.px4, 2'b00})
                   + 16'(r_q.mvx >>> 2) - 16'd2);
    ys   = $signed(16'({r_q.mb_y, 4'b0000}) + 16'({r_q.py4, 2'b00})
                   + 16'(r_q.mvy >>> 2) - 16'd2);
    rbx  = 8'(xs >>> 2);
    rby  = 8'(ys >>> 2);
    offx = xs[1:0];
    offy = ys[1:0];
    cx0  = r_q.px4[0] ? 3'd3 : 3'd0;
    cy0  = r_q.py4[0] ? 3'd3 : 3'd0;
  end

  // tile geometry
  logic       sx, sy;
  logic [2:0] nx, ny;              // region size in blocks
  logic       tile_exists, tile_needed;
  logic       wide, tall;          // tile is 3 blocks wide / tall
  assign sx = tile[0];
  assign sy = tile[1];
  assign nx = r_q.w4 + 3'd2;
  assign ny = r_q.h4 + 3'd2;
  assign tile_exists = (!sx || nx > 3'd3) && (!sy || ny > 3'd3);
  // block (bi,bj) reads region blocks bi..bi+2: segment 1 starts at block 3
  assign tile_needed = tile_exists && !fetched[tile]
                    && (!sx || bi >= 3'd1) && (!sy || bj >= 3'd1);
  assign wide = !sx || (nx == 3'd6);
  assign tall = !sy || (ny == 3'd6);

  always_comb begin
    cmd = '0;
    if (state == P_IDLE) begin
      cmd = req.raw;
    end else if (state == P_FETCH) begin
      cmd.op    = CMD_FETCH;
      cmd.plane = PLANE_Y;
      cmd.mode  = wide ? (tall ? RD_M0 : RD_M1) : (tall ? RD_M2 : RD_M3);
      cmd.bx    = rbx + (sx ? 8'd3 : 8'd0);
      cmd.by    = rby + (sy ? 8'd3 : 8'd0);
      cmd.cx    = (cx0 + (sx ? 3'd3 : 3'd0)) % 3'd6;
      cmd.cy    = (cy0 + (sy ? 3'd3 : 3'd0)) % 3'd6;
    end else begin
      cmd.op = CMD_LUMA;
      cmd.x0 = 5'(({2'b00, cx0} * 5'd4 + 5'(offx) + {bi, 2'b00}) % 5'd24);
      cmd.y0 = 5'(({2'b00, cy0} * 5'd4 + 5'(offy) + {bj, 2'b00}) % 5'd24);
      cmd.fx = {1'b0, r_q.mvx[1:0]};
      cmd.fy = {1'b0, r_q.mvy[1:0]};
    end
  end

  assign req_ready = (state == P_IDLE) && (req.kind == REQ_PART || cmd_ready);
  assign cmd_valid = (state == P_IDLE) ? (req_valid && req.kind == REQ_RAW)
                   : (state == P_FETCH) ? tile_needed
                   : 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= P_IDLE;
      r_q     <= '0;
      bi      <= '0;
      bj      <= '0;
      fetched <= '0;
      tile    <= '0;
    end else begin
      case (state)
        P_IDLE: if (req_valid && req.kind == REQ_PART) begin
          r_q     <= req;
          bi      <= '0;
          bj      <= '0;
          fetched <= '0;
          tile    <= '0;
          state   <= P_FETCH;
        end
        P_FETCH: begin
          // walk the four tiles; emit the needed ones
          if (!tile_needed || cmd_ready) begin
            if (tile_needed) fetched[tile] <= 1'b1;
            if (tile == 2'd3) state <= P_LUMA;
            tile <= tile + 1'b1;
          end
        end
        P_LUMA: if (cmd_ready) begin
          tile <= '0;
          if (bi == r_q.w4 - 3'd1) begin
            bi <= '0;
            if (bj == r_q.h4 - 3'd1) state <= P_IDLE;
            else begin
              bj    <= bj + 1'b1;
              state <= P_FETCH;
            end
          end else begin
            bi    <= bi + 1'b1;
            state <= P_FETCH;
          end
        end
        default: state <= P_IDLE;
      endcase
    end
  end

endmodule
