// tb_ref_pkg: reference models for the motion-estimation testbenches, written
// directly from the definitions (pixel formulas, block lists, search order)
// rather than from the RTL structure.
package tb_ref_pkg;

  localparam int SWE = 53;           // window edge of the default configuration
  int sw [SWE][SWE];                 // [Y][X]
  int cur [16][16];                  // [y][x]

  // Block list: position and size in pixels, same numbering as the design.
  int bx [41], by [41], bw [41], bh [41];

  function automatic void build_blocks();
    int n;
    n = 0;
    bx[n] = 0; by[n] = 0; bw[n] = 16; bh[n] = 16; n++;
    for (int i = 0; i < 2; i++) begin bx[n] = 0;     by[n] = 8 * i; bw[n] = 16; bh[n] = 8;  n++; end
    for (int i = 0; i < 2; i++) begin bx[n] = 8 * i; by[n] = 0;     bw[n] = 8;  bh[n] = 16; n++; end
    for (int i = 0; i < 4; i++) begin bx[n] = 8 * (i % 2); by[n] = 8 * (i / 2); bw[n] = 8; bh[n] = 8; n++; end
    for (int i = 0; i < 4; i++)
      for (int s = 0; s < 2; s++) begin
        bx[n] = 8 * (i % 2); by[n] = 8 * (i / 2) + 4 * s; bw[n] = 8; bh[n] = 4; n++;
      end
    for (int i = 0; i < 4; i++)
      for (int s = 0; s < 2; s++) begin
        bx[n] = 8 * (i % 2) + 4 * s; by[n] = 8 * (i / 2); bw[n] = 4; bh[n] = 8; n++;
      end
    for (int i = 0; i < 16; i++) begin bx[n] = 4 * (i % 4); by[n] = 4 * (i / 4); bw[n] = 4; bh[n] = 4; n++; end
  endfunction

  function automatic int clip255(int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  function automatic int tap(int a, int b, int c, int d, int e, int f);
    return a - 5 * b + 20 * c + 20 * d - 5 * e + f;
  endfunction

  // Unrounded horizontal half-pel sum between (x, y) and (x+1, y).
  function automatic int hsum(int x, int y);
    return tap(sw[y][x-2], sw[y][x-1], sw[y][x], sw[y][x+1], sw[y][x+2], sw[y][x+3]);
  endfunction

  // Sample at half-pel position (x2 / 2, y2 / 2) of the window.
  function automatic int hpel(int x2, int y2);
    int x, y;
    x = x2 >>> 1; y = y2 >>> 1;
    if (x2 % 2 == 0 && y2 % 2 == 0) return sw[y][x];
    if (y2 % 2 == 0) return clip255((hsum(x, y) + 16) >>> 5);
    if (x2 % 2 == 0)
      return clip255((tap(sw[y-2][x], sw[y-1][x], sw[y][x], sw[y+1][x], sw[y+2][x], sw[y+3][x]) + 16) >>> 5);
    return clip255((tap(hsum(x, y-2), hsum(x, y-1), hsum(x, y), hsum(x, y+1), hsum(x, y+2), hsum(x, y+3)) + 512) >>> 10);
  endfunction

  // Sample at quarter-pel position (x4 / 4, y4 / 4) of the window, from the
  // H.264 table of the sixteen sub-positions around integer pixel G: G, b, h
  // and j are the integer, horizontal, vertical and centre samples, H and M
  // the integer pixels right and below, m and s the half samples right of h
  // and below b.
  function automatic int qpel(int x4, int y4);
    int x, y, fx, fy, G, H, M, b, h, j, m, s;
    x = x4 >>> 2; y = y4 >>> 2; fx = x4 & 3; fy = y4 & 3;
    G = hpel(2 * x, 2 * y);         H = hpel(2 * x + 2, 2 * y);
    M = hpel(2 * x, 2 * y + 2);     b = hpel(2 * x + 1, 2 * y);
    h = hpel(2 * x, 2 * y + 1);     j = hpel(2 * x + 1, 2 * y + 1);
    m = hpel(2 * x + 2, 2 * y + 1); s = hpel(2 * x + 1, 2 * y + 2);
    case ({fy[1:0], fx[1:0]})
      4'b0000: return G;
      4'b0001: return (G + b + 1) >> 1;
      4'b0010: return b;
      4'b0011: return (b + H + 1) >> 1;
      4'b0100: return (G + h + 1) >> 1;
      4'b0101: return (b + h + 1) >> 1;
      4'b0110: return (b + j + 1) >> 1;
      4'b0111: return (b + m + 1) >> 1;
      4'b1000: return h;
      4'b1001: return (h + j + 1) >> 1;
      4'b1010: return j;
      4'b1011: return (j + m + 1) >> 1;
      4'b1100: return (h + M + 1) >> 1;
      4'b1101: return (h + s + 1) >> 1;
      4'b1110: return (j + s + 1) >> 1;
      default: return (m + s + 1) >> 1;
    endcase
  endfunction

  // Sum of absolute values of H * D * H^T, H the 4x4 Hadamard matrix.
  function automatic int satd4(int d [4][4]);
    int h [4][4] = '{'{1, 1, 1, 1}, '{1, 1, -1, -1}, '{1, -1, -1, 1}, '{1, -1, 1, -1}};
    int t [4][4];
    int s, v;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        t[i][j] = 0;
        for (int k = 0; k < 4; k++) t[i][j] += h[i][k] * d[k][j];
      end
    s = 0;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        v = 0;
        for (int k = 0; k < 4; k++) v += t[i][k] * h[j][k];
        s += v < 0 ? -v : v;
      end
    return s;
  endfunction

  // Length of the signed Exp-Golomb code of v.
  function automatic int se_bits(int v);
    int code, len;
    code = v > 0 ? 2 * v - 1 : -2 * v;
    len = 1;
    while ((code + 1) >= (1 << ((len + 1) / 2))) len += 2;
    return len;
  endfunction

  // SATD of block b at half-pel displacement (mx2, my2) from window origin off.
  function automatic int block_satd(int b, int off, int mx2, int my2);
    int d [4][4];
    int s;
    s = 0;
    for (int ey = 0; ey < bh[b]; ey += 4)
      for (int ex = 0; ex < bw[b]; ex += 4) begin
        for (int y = 0; y < 4; y++)
          for (int x = 0; x < 4; x++) begin
            int px, py;
            px = bx[b] + ex + x; py = by[b] + ey + y;
            d[y][x] = cur[py][px] - hpel(2 * (off + px) + mx2, 2 * (off + py) + my2);
          end
        s += satd4(d);
      end
    return s;
  endfunction

  // SATD of block b at quarter-pel displacement (mx4, my4) from window origin off.
  function automatic int block_satd_q(int b, int off, int mx4, int my4);
    int d [4][4];
    int s;
    s = 0;
    for (int ey = 0; ey < bh[b]; ey += 4)
      for (int ex = 0; ex < bw[b]; ex += 4) begin
        for (int y = 0; y < 4; y++)
          for (int x = 0; x < 4; x++) begin
            int px, py;
            px = bx[b] + ex + x; py = by[b] + ey + y;
            d[y][x] = cur[py][px] - qpel(4 * (off + px) + mx4, 4 * (off + py) + my4);
          end
        s += satd4(d);
      end
    return s;
  endfunction

  // Two-pass refinement of block b around integer vector (ix, iy): the
  // integer position and its eight half-pel neighbours, then, if quarter is
  // set, the eight quarter-pel neighbours of the winner. J = SATD + lambda *
  // (bits(mvd x) + bits(mvd y)); each pass starts from its centre and moves
  // only on a strictly lower J, candidates in raster order.
  function automatic void fme_ref(int b, int off, int ix, int iy, int lambda, int pmx, int pmy,
                                  bit quarter, output int bj, output int bmx, output int bmy);
    int cx, cy;
    bj = -1;
    for (int pass = 0; pass < (quarter ? 2 : 1); pass++) begin
      cx = (pass == 0) ? 4 * ix : bmx;
      cy = (pass == 0) ? 4 * iy : bmy;
      for (int n = 0; n < 10; n++) begin
        int t, mx4, my4, jt, step;
        if (pass == 1 && n == 0) continue;
        t = (n == 0) ? 4 : n - 1;
        step = (pass == 0) ? 2 : 1;
        mx4 = cx + step * (t % 3 - 1);
        my4 = cy + step * (t / 3 - 1);
        jt = block_satd_q(b, off, mx4, my4) + lambda * (se_bits(mx4 - pmx) + se_bits(my4 - pmy));
        if (bj < 0 || jt < bj) begin bj = jt; bmx = mx4; bmy = my4; end
      end
    end
  endfunction

  // IME SAD of block b at candidate window position (wx, wy).
  function automatic int block_sad(int b, int wx, int wy, int trunc, bit sub);
    int s;
    s = 0;
    for (int y = by[b]; y < by[b] + bh[b]; y++)
      for (int x = bx[b]; x < bx[b] + bw[b]; x++) begin
        int a, r;
        if (sub && ((x + y) % 2 == 1)) continue;
        a = cur[y][x] >> trunc;
        r = sw[wy + y][wx + x] >> trunc;
        s += a > r ? a - r : r - a;
      end
    return s;
  endfunction

  // Random window and block; `smooth` makes the window a sum of gradients so
  // the best match is unambiguous more often.
  function automatic void fill_random(int seed_dummy);
    for (int y = 0; y < SWE; y++)
      for (int x = 0; x < SWE; x++) sw[y][x] = $urandom_range(0, 255);
    for (int y = 0; y < 16; y++)
      for (int x = 0; x < 16; x++) cur[y][x] = $urandom_range(0, 255);
  endfunction

  // Current block = window content at (wx, wy) plus small noise.
  function automatic void plant_block(int wx, int wy, int noise);
    for (int y = 0; y < 16; y++)
      for (int x = 0; x < 16; x++)
        cur[y][x] = clip255(sw[wy + y][wx + x] + $urandom_range(0, 2 * noise) - noise);
  endfunction

endpackage
