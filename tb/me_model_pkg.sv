// me_model_pkg: reference model of the binary pyramid motion estimation, for the
// testbenches. It is written from the algorithm, position by position, and shares no
// code with the RTL: binarization uses real-valued averages, and the search simply
// loops over every position of each layer.
package me_model_pkg;

  typedef struct {
    int x;
    int y;
    int cost;
  } mres_t;

  typedef struct {
    bit lv3 [16][16];
    bit lv2 [8][8];
    bit lv1 [4][4];
  } layers_t;

  // Reference windows relative to their origin: window row/col = L + d + offset.
  typedef struct {
    bit w3 [48][48];
    bit w2 [24][24];
    bit w1 [12][12];
  } win_t;

  function automatic int clampi(int v, int lo, int hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction

  // Binarize an 18x18 block (raster order) into the three layers.
  function automatic layers_t binarize(byte unsigned pix [324]);
    layers_t o;
    real d2 [8][8];
    real d1 [4][4];
    for (int r = 0; r < 16; r++)
      for (int c = 0; c < 16; c++) begin
        real f;
        f = (real'(pix[r*18 + c+1]) + real'(pix[(r+2)*18 + c+1]) +
             real'(pix[(r+1)*18 + c]) + real'(pix[(r+1)*18 + c+2])) / 4.0;
        o.lv3[r][c] = (f >= real'(pix[(r+1)*18 + c+1]));
      end
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++)
        d2[r][c] = (real'(pix[(2*r+1)*18 + 2*c+1]) + real'(pix[(2*r+1)*18 + 2*c+2]) +
                    real'(pix[(2*r+2)*18 + 2*c+1]) + real'(pix[(2*r+2)*18 + 2*c+2])) / 4.0;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        d1[r][c] = (d2[2*r][2*c] + d2[2*r][2*c+1] + d2[2*r+1][2*c] + d2[2*r+1][2*c+1]) / 4.0;
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) begin
        real f;
        f = (d2[clampi(r-1,0,7)][c] + d2[clampi(r+1,0,7)][c] +
             d2[r][clampi(c-1,0,7)] + d2[r][clampi(c+1,0,7)]) / 4.0;
        o.lv2[r][c] = (f >= d2[r][c]);
      end
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        real f;
        f = (d1[clampi(r-1,0,3)][c] + d1[clampi(r+1,0,3)][c] +
             d1[r][clampi(c-1,0,3)] + d1[r][clampi(c+1,0,3)]) / 4.0;
        o.lv1[r][c] = (f >= d1[r][c]);
      end
    return o;
  endfunction

  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

  // a before b: lower cost, then raster order (dy, then dx).
  function automatic bit ahead(mres_t a, mres_t b);
    if (a.cost != b.cost) return a.cost < b.cost;
    if (a.y != b.y) return a.y < b.y;
    return a.x < b.x;
  endfunction

  // SOD of a layer at vector (dx,dy), restricted to rows [r0,r1) and cols [c0,c1).
  function automatic int sod_at(input layers_t cur, input win_t w, int lv, int dx, int dy,
                                int r0, int r1, int c0, int c1);
    int s, L;
    s = 0;
    L = (lv == 1) ? 4 : (lv == 2) ? 8 : 16;
    for (int r = r0; r < r1; r++)
      for (int c = c0; c < c1; c++) begin
        bit a, b;
        case (lv)
          1: begin a = cur.lv1[r][c]; b = w.w1[L+dy+r][L+dx+c]; end
          2: begin a = cur.lv2[r][c]; b = w.w2[L+dy+r][L+dx+c]; end
          default: begin a = cur.lv3[r][c]; b = w.w3[L+dy+r][L+dx+c]; end
        endcase
        s += int'(a ^ b);
      end
    return s;
  endfunction

  function automatic int shr(int v, int s);
    return v >>> s;
  endfunction

  // Full pyramid search. Returns the 16x16 result and the four 8x8 results.
  // out_of_range: an LV2 or LV3 refinement reached outside the search range.
  function automatic void search(input layers_t cur, input win_t w, int pmx, int pmy,
                                 int lambda, output mres_t r16, output mres_t r8 [4],
                                 output bit out_of_range);
    mres_t b1, b2, b;
    int    cx [2], cy [2], px, py;
    out_of_range = 0;
    // LV1: full search of [-4,3]
    px = shr(pmx, 2); py = shr(pmy, 2);
    b1.cost = 1 << 30; b1.x = 0; b1.y = 0;
    b2 = b1;
    for (int dy = -4; dy < 4; dy++)
      for (int dx = -4; dx < 4; dx++) begin
        mres_t m;
        m.x = dx; m.y = dy;
        m.cost = sod_at(cur, w, 1, dx, dy, 0, 4, 0, 4) + lambda * (iabs(dx-px) + iabs(dy-py));
        if (ahead(m, b1)) begin b2 = b1; b1 = m; end
        else if (ahead(m, b2)) b2 = m;
      end
    cx[0] = 2*b1.x; cy[0] = 2*b1.y; cx[1] = 2*b2.x; cy[1] = 2*b2.y;
    // LV2: +/-1 around both candidates, within [-8,7]
    px = shr(pmx, 1); py = shr(pmy, 1);
    b.cost = 1 << 30; b.x = 0; b.y = 0;
    for (int c = 0; c < 2; c++)
      for (int dy = cy[c]-1; dy <= cy[c]+1; dy++)
        for (int dx = cx[c]-1; dx <= cx[c]+1; dx++) begin
          mres_t m;
          if (dx < -8 || dx > 7 || dy < -8 || dy > 7) begin out_of_range = 1; continue; end
          m.x = dx; m.y = dy;
          m.cost = sod_at(cur, w, 2, dx, dy, 0, 8, 0, 8) + lambda * (iabs(dx-px) + iabs(dy-py));
          if (ahead(m, b)) b = m;
        end
    // LV3: +/-1 around the LV2 result, 16x16 and four 8x8 quadrants
    r16.cost = 1 << 30; r16.x = 0; r16.y = 0;
    for (int q = 0; q < 4; q++) r8[q] = r16;
    for (int dy = 2*b.y-1; dy <= 2*b.y+1; dy++)
      for (int dx = 2*b.x-1; dx <= 2*b.x+1; dx++) begin
        mres_t m;
        int mvc;
        if (dx < -16 || dx > 15 || dy < -16 || dy > 15) begin out_of_range = 1; continue; end
        mvc = lambda * (iabs(dx-pmx) + iabs(dy-pmy));
        m.x = dx; m.y = dy;
        m.cost = sod_at(cur, w, 3, dx, dy, 0, 16, 0, 16) + mvc;
        if (ahead(m, r16)) r16 = m;
        for (int q = 0; q < 4; q++) begin
          mres_t mq;
          mq.x = dx; mq.y = dy;
          mq.cost = sod_at(cur, w, 3, dx, dy, (q/2)*8, (q/2)*8+8, (q%2)*8, (q%2)*8+8) + mvc;
          if (ahead(mq, r8[q])) r8[q] = mq;
        end
      end
  endfunction

endpackage
