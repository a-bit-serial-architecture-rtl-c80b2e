// Pre-fetch unit: copies 4x4 blocks of a reference picture from external
// memory into the local cache using four reading modes:
//   M0  3x3 blocks (a block and its surrounding)
//   M1  a row of 3 blocks
//   M2  a column of 3 blocks
//   M3  a single block
// The picture is stored block by block: each 4x4 block is four consecutive
// 32-bit words, one per row, and blocks follow in raster order, so a block is
// read with four sequential accesses. One word is requested per clock while
// the memory grants; words return in order (any latency) and are written to
// the cache, whose block position wraps modulo 6. An M0 fetch therefore takes
// 36 granted clocks. The reading modes and the word layout follow the source
// architecture; the memory handshake, plane layout and wrap-around are this
// design's choices. `ready` is high only when nothing is outstanding.
module prefetch_unit
  import avc_inter_pkg::*;
#(
  parameter int unsigned PIC_W  = 720,     // luma picture width, samples
  parameter int unsigned PIC_H  = 576,     // luma picture height, samples
  parameter int unsigned ADDR_W = 18       // external word address bits
) (
  input  logic              clk,
  input  logic              rst_n,
  // command
  input  logic              start,
  input  rd_mode_e          mode,
  input  plane_e            plane,
  input  logic [7:0]        bx,            // picture block column
  input  logic [7:0]        by,            // picture block row
  input  logic [2:0]        cx,            // cache block column
  input  logic [2:0]        cy,            // cache block row
  output logic              ready,
  // external memory, in-order read returns
  output logic              mem_req,
  output logic [ADDR_W-1:0] mem_addr,
  input  logic              mem_gnt,
  input  logic              mem_rvalid,
  input  logic [31:0]       mem_rdata,
  // cache write port
  output logic              cache_we,
  output logic [4:0]        cache_wrow,
  output logic [2:0]        cache_wcol,
  output logic [31:0]       cache_wdata
);
  localparam int unsigned Y_BW    = PIC_W / 4;                 // luma blocks per row
  localparam int unsigned Y_WORDS = (PIC_W / 4) * (PIC_H / 4) * 4;
  localparam int unsigned C_BW    = PIC_W / 8;                 // chroma blocks per row
  localparam int unsigned C_WORDS = (PIC_W / 8) * (PIC_H / 8) * 4;

  logic       busy;
  rd_mode_e   mode_q;
  plane_e     plane_q;
  logic [7:0] bx_q, by_q;
  logic [2:0] cx_q, cy_q;
  logic [5:0] nwords, iss_cnt, ret_cnt;

  function automatic logic [5:0] words_of(input rd_mode_e m);
    return (m == RD_M0) ? 6'd36 : (m == RD_M3) ? 6'd4 : 6'd12;
  endfunction

  // block offset (dx,dy) of word i within the fetched group
  function automatic logic [3:0] offs(input rd_mode_e m, input logic [5:0] i);
    logic [3:0] blk;
    logic [1:0] dx, dy;
    blk = 4'(i >> 2);
    case (m)
      RD_M0:   begin dx = 2'(blk % 3); dy = 2'(blk / 3); end
      RD_M1:   begin dx = blk[1:0];    dy = 2'd0;        end
      RD_M2:   begin dx = 2'd0;        dy = blk[1:0];    end
      default: begin dx = 2'd0;        dy = 2'd0;        end
    endcase
    return {dy, dx};
  endfunction

  // request address
  logic [3:0]  iss_off;
  logic [ADDR_W-1:0] base, bw;
  always_comb begin
    iss_off = offs(mode_q, iss_cnt);
    case (plane_q)
      PLANE_CB: begin base = ADDR_W'(Y_WORDS);           bw = ADDR_W'(C_BW); end
      PLANE_CR: begin base = ADDR_W'(Y_WORDS + C_WORDS); bw = ADDR_W'(C_BW); end
      default:  begin base = '0;                         bw = ADDR_W'(Y_BW); end
    endcase
    mem_addr = base
             + ((ADDR_W'(by_q) + ADDR_W'(iss_off[3:2])) * bw
                + ADDR_W'(bx_q) + ADDR_W'(iss_off[1:0])) * 4
             + ADDR_W'(iss_cnt[1:0]);
  end
  assign mem_req = busy && (iss_cnt != nwords);

  // cache destination of the returning word
  logic [3:0] ret_off;
  logic [2:0] crow_blk, ccol_blk;
  always_comb begin
    ret_off  = offs(mode_q, ret_cnt);
    crow_blk = cy_q + 3'(ret_off[3:2]);
    ccol_blk = cx_q + 3'(ret_off[1:0]);
    if (crow_blk >= 3'(CACHE_BLK)) crow_blk = crow_blk - 3'(CACHE_BLK);
    if (ccol_blk >= 3'(CACHE_BLK)) ccol_blk = ccol_blk - 3'(CACHE_BLK);
  end
  assign cache_we    = busy && mem_rvalid;
  assign cache_wrow  = {crow_blk, ret_cnt[1:0]};
  assign cache_wcol  = ccol_blk;
  assign cache_wdata = mem_rdata;

  assign ready = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      iss_cnt <= '0;
      ret_cnt <= '0;
      nwords  <= '0;
      mode_q  <= RD_M0;
      plane_q <= PLANE_Y;
      {bx_q, by_q, cx_q, cy_q} <= '0;
    end else if (!busy) begin
      if (start) begin
        busy    <= 1'b1;
        iss_cnt <= '0;
        ret_cnt <= '0;
        nwords  <= words_of(mode);
        mode_q  <= mode;
        plane_q <= plane;
        bx_q <= bx; by_q <= by; cx_q <= cx; cy_q <= cy;
      end
    end else begin
      if (mem_req && mem_gnt) iss_cnt <= iss_cnt + 1'b1;
      if (mem_rvalid) begin
        ret_cnt <= ret_cnt + 1'b1;
        if (ret_cnt == nwords - 1'b1) busy <= 1'b0;
      end
    end
  end

endmodule
