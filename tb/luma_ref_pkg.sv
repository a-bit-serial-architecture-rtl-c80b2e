// Reference model of H.264 luma sample interpolation for one 4x4 block,
// written directly from the standard's formulas in plain integer arithmetic.
// Used by the testbenches to check the bit-serial hardware.
package luma_ref_pkg;

  function automatic int clip255(input int v);
    return (v < 0) ? 0 : (v > 255 ? 255 : v);
  endfunction

  function automatic int tap6(input int e, f, g, h, i, j);
    return e - 5*f + 20*g + 20*h - 5*i + j;
  endfunction

  // win: 9x9 window, row major; window (r,c) is reference sample (c-2, r-2)
  // relative to the block; returns the prediction of block sample (x,y)
  function automatic int luma_pred(input int win[81], input int fx, input int fy,
                                   input int x, input int y);
    int b1, s1, h1, m1, j1, G, Hr, M, b, s, h, m, j;
    int hr[6];
    G  = win[(y+2)*9 + x+2];
    Hr = win[(y+2)*9 + x+3];
    M  = win[(y+3)*9 + x+2];
    b1 = tap6(win[(y+2)*9+x], win[(y+2)*9+x+1], win[(y+2)*9+x+2],
              win[(y+2)*9+x+3], win[(y+2)*9+x+4], win[(y+2)*9+x+5]);
    s1 = tap6(win[(y+3)*9+x], win[(y+3)*9+x+1], win[(y+3)*9+x+2],
              win[(y+3)*9+x+3], win[(y+3)*9+x+4], win[(y+3)*9+x+5]);
    h1 = tap6(win[y*9+x+2], win[(y+1)*9+x+2], win[(y+2)*9+x+2],
              win[(y+3)*9+x+2], win[(y+4)*9+x+2], win[(y+5)*9+x+2]);
    m1 = tap6(win[y*9+x+3], win[(y+1)*9+x+3], win[(y+2)*9+x+3],
              win[(y+3)*9+x+3], win[(y+4)*9+x+3], win[(y+5)*9+x+3]);
    for (int k = 0; k < 6; k++)
      hr[k] = tap6(win[(y+k)*9+x], win[(y+k)*9+x+1], win[(y+k)*9+x+2],
                   win[(y+k)*9+x+3], win[(y+k)*9+x+4], win[(y+k)*9+x+5]);
    j1 = tap6(hr[0], hr[1], hr[2], hr[3], hr[4], hr[5]);
    b = clip255((b1 + 16) >>> 5);
    s = clip255((s1 + 16) >>> 5);
    h = clip255((h1 + 16) >>> 5);
    m = clip255((m1 + 16) >>> 5);
    j = clip255((j1 + 512) >>> 10);
    case (fx*4 + fy)
      0:  return G;
      1:  return (G + h + 1) >> 1;
      2:  return h;
      3:  return (M + h + 1) >> 1;
      4:  return (G + b + 1) >> 1;
      5:  return (b + h + 1) >> 1;
      6:  return (h + j + 1) >> 1;
      7:  return (h + s + 1) >> 1;
      8:  return b;
      9:  return (b + j + 1) >> 1;
      10: return j;
      11: return (j + s + 1) >> 1;
      12: return (Hr + b + 1) >> 1;
      13: return (b + m + 1) >> 1;
      14: return (j + m + 1) >> 1;
      default: return (m + s + 1) >> 1;
    endcase
  endfunction

endpackage
