// Test picture used by the memory model and the reference checks. The picture
// is never stored: every sample is a fixed hash of its plane and position, so
// the memory model and the checker agree without sharing data. The external
// memory layout is: luma plane, then Cb, then Cr; in each plane 4x4 blocks in
// raster order, each block four 32-bit words (one per row, sample x%4 in byte
// x%4).
package frame_ref_pkg;
  localparam int PIC_W = 720;
  localparam int PIC_H = 576;
  localparam int Y_WORDS = (PIC_W / 4) * (PIC_H / 4) * 4;
  localparam int C_WORDS = (PIC_W / 8) * (PIC_H / 8) * 4;

  function automatic int sample_at(input int plane, input int x, input int y);
    int unsigned h;
    h = (plane * 7919 + x * 2654435761 + y * 40503 + (x ^ y) * 97) & 32'hffffffff;
    h = h ^ (h >> 15);
    h = h * 2246822519;
    h = h ^ (h >> 13);
    // a few samples pinned at the extremes to exercise clipping
    if ((h & 32'h1f) == 0) return 255;
    if ((h & 32'h1f) == 1) return 0;
    return (h >> 8) & 255;
  endfunction

  // word at an external memory address
  function automatic logic [31:0] word_at(input int addr);
    int plane, a, bw, blk, row, bx, by;
    logic [31:0] w;
    if (addr < Y_WORDS) begin plane = 0; a = addr; bw = PIC_W / 4; end
    else if (addr < Y_WORDS + C_WORDS) begin plane = 1; a = addr - Y_WORDS; bw = PIC_W / 8; end
    else begin plane = 2; a = addr - Y_WORDS - C_WORDS; bw = PIC_W / 8; end
    blk = a / 4; row = a % 4;
    bx = blk % bw; by = blk / bw;
    for (int k = 0; k < 4; k++) w[8*k +: 8] = 8'(sample_at(plane, bx*4 + k, by*4 + row));
    return w;
  endfunction
endpackage
