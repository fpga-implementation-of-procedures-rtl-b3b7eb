// vq_tb_pkg: test frames and a reference model for the video-quality channel.
//
// Frames are never stored: pix() computes the pixel at (x, y) from a pattern
// number and a seed, so a testbench can stream a frame of any size. mb_word()
// packs microblock m (0..3) of block b of a frame into a stream word in the
// transfer order (blocks in raster order, microblocks top-left, top-right,
// bottom-left, bottom-right, pixels column by column). ref_frame() works out
// the expected result word directly from frame coordinates, without
// microblocks, using the metric definitions:
//   blockiness  per 8x8 block at (X, Y), border between columns X+6|X+7 and
//               rows Y+6|Y+7:
//                 rows Y+0..Y+4 and Y+7: intra |f(X+6)-f(X+5)|, inter |f(X+6)-f(X+7)|
//                 cols X+0..X+4 and X+7: intra |f(Y+5)-f(Y+6)|, inter |f(Y+7)-f(Y+6)|
//   exposure    ((sum of the 4 smallest and 4 largest block sums, each >> 2) >> 7)
//   blackout    (largest block sum - smallest block sum) <= 4
//   interlace   number of 4x4 microblocks whose rows alternate in direction
//               in every column
package vq_tb_pkg;
  import vq_pkg::*;

  typedef enum int {
    P_RANDOM, P_FLAT, P_INTERLACED, P_BLOCKY, P_DARK, P_BRIGHT, P_MIXED
  } pattern_t;

  function automatic int unsigned hash3(int unsigned a, int unsigned b, int unsigned c);
    int unsigned h;
    h = a * 32'h9E3779B1 ^ (b + 32'h7F4A7C15) * 32'h85EBCA77 ^ c * 32'hC2B2AE3D;
    h ^= h >> 15;
    h *= 32'h2C1B3C6D;
    h ^= h >> 12;
    return h;
  endfunction

  function automatic int unsigned pix(pattern_t p, int unsigned seed, int unsigned x, int unsigned y);
    int unsigned r;
    r = hash3(x, y, seed);
    case (p)
      P_RANDOM:     return r & 255;
      P_FLAT:       return seed & 255;
      P_INTERLACED: return (y % 2 == 0) ? 170 + (r % 60) : 20 + (r % 60);
      P_BLOCKY:     return ((x / 8) * 37 + (y / 8) * 59 + seed) % 200 + (r % 8);
      P_DARK:       return r % 24;
      P_BRIGHT:     return 232 + (r % 24);
      default:      // left half interlaced, right half random
        return (x < 64) ? ((y % 2 == 0) ? 150 + (r % 100) : (r % 100)) : (r & 255);
    endcase
  endfunction

  function automatic logic [STREAM_W-1:0] mb_word(pattern_t p, int unsigned seed,
                                                  int unsigned w, int unsigned b,
                                                  int unsigned m);
    logic [STREAM_W-1:0] word;
    int unsigned x0, y0;
    x0 = (b % (w / 8)) * 8 + (m % 2) * 4;
    y0 = (b / (w / 8)) * 8 + (m / 2) * 4;
    for (int k = 0; k < 16; k++)
      word[8*k +: 8] = 8'(pix(p, seed, x0 + k / 4, y0 + k % 4));
    return word;
  endfunction

  function automatic logic [STREAM_W-1:0] header_word(int unsigned w, int unsigned h);
    return {96'd0, 16'(h), 16'(w)};
  endfunction

  function automatic int unsigned adiff(int unsigned a, int unsigned b);
    return (a > b) ? a - b : b - a;
  endfunction

  function automatic vq_result_t ref_frame(pattern_t p, int unsigned seed,
                                           int unsigned w, int unsigned h);
    vq_result_t res;
    int unsigned intra, inter, ilace, bs;
    int unsigned lo[$], hi[$];
    int unsigned tot;
    int unsigned rows[6] = '{0, 1, 2, 3, 4, 7};
    bit up, dn;
    intra = 0; inter = 0; ilace = 0;
    for (int unsigned by = 0; by < h / 8; by++) begin
      for (int unsigned bx = 0; bx < w / 8; bx++) begin
        int unsigned X = bx * 8, Y = by * 8;
        foreach (rows[i]) begin
          intra += adiff(pix(p, seed, X+6, Y+rows[i]), pix(p, seed, X+5, Y+rows[i]));
          inter += adiff(pix(p, seed, X+6, Y+rows[i]), pix(p, seed, X+7, Y+rows[i]));
          intra += adiff(pix(p, seed, X+rows[i], Y+5), pix(p, seed, X+rows[i], Y+6));
          inter += adiff(pix(p, seed, X+rows[i], Y+7), pix(p, seed, X+rows[i], Y+6));
        end
        bs = 0;
        for (int unsigned yy = 0; yy < 8; yy++)
          for (int unsigned xx = 0; xx < 8; xx++) bs += pix(p, seed, X+xx, Y+yy);
        lo.push_back(bs); lo.sort();  if (lo.size() > 4) void'(lo.pop_back());
        hi.push_back(bs); hi.rsort(); if (hi.size() > 4) void'(hi.pop_back());
      end
    end
    for (int unsigned my = 0; my < h / 4; my++) begin
      for (int unsigned mx = 0; mx < w / 4; mx++) begin
        up = 1; dn = 1;
        for (int unsigned c = 0; c < 4; c++) begin
          int unsigned a0, a1, a2, a3;
          a0 = pix(p, seed, mx*4+c, my*4);   a1 = pix(p, seed, mx*4+c, my*4+1);
          a2 = pix(p, seed, mx*4+c, my*4+2); a3 = pix(p, seed, mx*4+c, my*4+3);
          up &= (a0 > a1) && (a2 > a1) && (a2 > a3);
          dn &= (a0 < a1) && (a2 < a1) && (a2 < a3);
        end
        if (up || dn) ilace++;
      end
    end
    while (lo.size() < 4) lo.push_back(16384);
    while (hi.size() < 4) hi.push_back(0);
    tot = 0;
    for (int i = 0; i < 4; i++) tot += (lo[i] >> 2) + (hi[i] >> 2);
    res = '0;
    res.intra_sum = intra;
    res.inter_sum = inter;
    res.interlace = ilace;
    res.exposure  = 8'(tot >> 7);
    res.blackout  = !(16'(hi[0] - lo[0]) > 16'd4);
    return res;
  endfunction
endpackage
