// fm_ref_pkg: reference model of the corner detector for the testbenches.
//
// Works on a whole image held in memory (img[y*w + x]) and evaluates every
// rule directly from the pixels with plain integer and real arithmetic,
// independently of the pipelined RTL: 3x3 row/column-sum gradients, the
// 8-neighbour average, the integer-step direction rule, the radius-3 ring,
// C1 (gradient >= 1.25 * average), C2 (|avg(p4) - avg(p'4)| < 0.125 * average,
// grey change (|c-a| + |c-b|) / 2), C3 (angle of the gradient at p4 and p'4
// against the centre's above atan(93/256), about 20 degrees; a zero vector
// counts as changed), C4 (one run of brighter ring pixels containing P0, one
// of darker ones containing P'0) and the 5x5 suppression with raster-order
// tie break.
package fm_ref_pkg;
  int w, h;
  int img[];

  int rdx[16] = '{3, 3, 2, 1, 0, -1, -2, -3, -3, -3, -2, -1, 0, 1, 2, 3};
  int rdy[16] = '{0, 1, 2, 3, 3, 3, 2, 1, 0, -1, -2, -3, -3, -3, -2, -1};

  function automatic int px(int x, int y);
    return img[y * w + x];
  endfunction

  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

  function automatic void grad(int x, int y, output int gx, output int gy,
                               output int gm, output int av);
    int s = 0;
    gx = 0; gy = 0;
    for (int d = -1; d <= 1; d++) begin
      gx += px(x + 1, y + d) - px(x - 1, y + d);
      gy += px(x + d, y + 1) - px(x + d, y - 1);
    end
    for (int j = -1; j <= 1; j++)
      for (int i = -1; i <= 1; i++)
        if (i != 0 || j != 0) s += px(x + i, y + j);
    gm = iabs(gx) + iabs(gy);
    av = s / 8;
  endfunction

  // direction index 0..7 (45-degree steps) of the integer step
  function automatic int dir_of(int gx, int gy);
    real ax = real'(iabs(gx)), ay = real'(iabs(gy));
    int sdx, sdy;
    if (ax < ay / 2.0)       begin sdx = 0; sdy = 2; end
    else if (ax < 1.5 * ay)  begin sdx = 1; sdy = 1; end
    else                     begin sdx = 2; sdy = 0; end
    if (gx < 0) sdx = -sdx;
    if (gy < 0) sdy = -sdy;
    if (sdy == 0)       return sdx > 0 ? 0 : 4;
    else if (sdx == 0)  return sdy > 0 ? 2 : 6;
    else if (sdx > 0)   return sdy > 0 ? 1 : 7;
    else                return sdy > 0 ? 3 : 5;
  endfunction

  function automatic bit turned(int ux, int uy, int vx, int vy);
    real a;
    if ((ux == 0 && uy == 0) || (vx == 0 && vy == 0)) return 1'b1;
    a = $atan2(real'(ux * vy - uy * vx), real'(ux * vx + uy * vy));
    if (a < 0) a = -a;
    return a > $atan(93.0 / 256.0);
  endfunction

  // all tests at one pixel (needs a 4-pixel border)
  function automatic void eval(int x, int y, output bit c1, output bit sym,
                               output bit c3, output bit c4, output int score);
    int gx, gy, gm, av, d, ia, ib;
    int agx, agy, agm, aav, bgx, bgy, bgm, bav;
    bit code[16];
    int runs1, trans;
    grad(x, y, gx, gy, gm, av);
    d  = dir_of(gx, gy);
    ia = (2 * d + 4) % 16;
    ib = (2 * d + 12) % 16;
    grad(x + rdx[ia], y + rdy[ia], agx, agy, agm, aav);
    grad(x + rdx[ib], y + rdy[ib], bgx, bgy, bgm, bav);
    c1  = real'(gm) >= 1.25 * real'(av);
    sym = real'(iabs(aav - bav)) < 0.125 * real'(av);
    score = sym ? (iabs(av - aav) + iabs(av - bav)) / 2 : 0;
    c3  = turned(gx, gy, agx, agy) && turned(gx, gy, bgx, bgy);
    for (int k = 0; k < 16; k++)
      code[k] = px(x + rdx[(2 * d + k) % 16], y + rdy[(2 * d + k) % 16]) > av;
    trans = 0;
    for (int k = 0; k < 16; k++) if (code[k] != code[(k + 1) % 16]) trans++;
    c4 = code[0] && !code[8] && trans == 2;
  endfunction

  // corner list of the whole image; margin 6 on every side
  function automatic void corners(ref int cx[$], ref int cy[$]);
    int sc[], ps[];
    bit c1, sym, c3, c4;
    sc = new[w * h];
    ps = new[w * h];
    foreach (sc[i]) begin sc[i] = 0; ps[i] = 0; end
    for (int y = 4; y < h - 4; y++)
      for (int x = 4; x < w - 4; x++) begin
        int s;
        eval(x, y, c1, sym, c3, c4, s);
        sc[y * w + x] = s;
        ps[y * w + x] = c1 && c3 && c4;
      end
    cx.delete(); cy.delete();
    for (int y = 6; y < h - 6; y++)
      for (int x = 6; x < w - 6; x++) begin
        int s = sc[y * w + x];
        bit ok = ps[y * w + x] && s != 0;
        for (int j = -2; j <= 2; j++)
          for (int i = -2; i <= 2; i++) begin
            int t = sc[(y + j) * w + x + i];
            if (j < 0 || (j == 0 && i < 0)) begin if (t >= s) ok = 0; end
            else if (j > 0 || (j == 0 && i > 0)) begin if (t > s) ok = 0; end
          end
        if (ok) begin cx.push_back(x); cy.push_back(y); end
      end
  endfunction

  // synthetic test image: 0x40 background, 0xC0 rectangles and triangles,
  // optional salt-and-pepper noise (per mille)
  function automatic void make_image(int iw, int ih, int n_shapes, int noise_pm);
    w = iw; h = ih;
    img = new[w * h];
    foreach (img[i]) img[i] = 8'h40;
    for (int s = 0; s < n_shapes; s++) begin
      int x0 = $urandom_range(w - 1), y0 = $urandom_range(h - 1);
      int sw = 3 + $urandom_range(8), sh = 3 + $urandom_range(8);
      int kind = $urandom_range(1);
      for (int y = y0; y < y0 + sh && y < h; y++)
        for (int x = x0; x < x0 + sw && x < w; x++)
          if (kind == 0 || (x - x0) <= (y - y0)) img[y * w + x] = 8'hC0;
    end
    foreach (img[i])
      if ($urandom_range(999) < noise_pm) img[i] = $urandom_range(1) ? 255 : 0;
  endfunction

  // ---------------- PCIe TLP builder ----------------
  typedef struct { logic [63:0] d; bit sop; bit eop; } beat_t;

  // 3-DWORD-header TLP on the 64-bit Avalon-ST layout. fmt/typ select the
  // kind (2'b10/5'b00000 memory write, 2'b00/5'b00000 memory read, 2'b11 a
  // 4-DWORD-header write); payload is used for writes only.
  function automatic void build_tlp(ref beat_t q[$], input logic [1:0] fmt, input logic [4:0] typ,
                                    input logic [31:0] addr, input logic [31:0] pl[$]);
    logic [31:0] dw0, dw1, dws[$];
    int n;
    dw0 = {1'b0, fmt, typ, 14'd0, 10'(pl.size())};
    dw1 = 32'h0000_00FF;
    q.push_back('{d: {dw1, dw0}, sop: 1, eop: 0});
    if (fmt == 2'b11) begin
      dws.push_back(32'h0);
      dws.push_back(addr);
    end else begin
      dws.push_back(addr);
      if (!addr[2]) dws.push_back(32'hDEAD_BEEF);
    end
    if (fmt[1]) foreach (pl[i]) dws.push_back(pl[i]);
    n = dws.size();
    for (int i = 0; i < n; i += 2)
      q.push_back('{d: {(i + 1 < n) ? dws[i+1] : 32'hBAD0_BAD0, dws[i]}, sop: 0, eop: (i + 2 >= n)});
  endfunction
endpackage
