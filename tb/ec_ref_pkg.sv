// ec_ref_pkg: reference model of the codec for the testbenches.
//
// Written as plain sequential code, independent of the RTL structure: the
// DCT passes are matrix products with the same 8-bit constants and rounding
// points as the hardware, the CGBPZ encoder and decoder write and read the
// segment bit by bit from the top, as the format describes it.
package ec_ref_pkg;

  typedef int blk_t [16];

  // 8-bit fixed-point 4-point DCT matrix, T8[k][n]
  function automatic int t8(int k, int n);
    int c [4][4];
    c = '{'{128, 128, 128, 128}, '{167, 69, -69, -167},
          '{128, -128, -128, 128}, '{69, -167, 167, -69}};
    return c[k][n];
  endfunction

  function automatic int rshift_round(int v, int sh);
    return (v + (1 << (sh - 1))) >>> sh;
  endfunction

  // forward 2-D DCT: rows first (2 fraction bits kept), then columns
  function automatic blk_t fdct(blk_t pix);
    int   rq [4][4];
    blk_t c;
    for (int r = 0; r < 4; r++)
      for (int u = 0; u < 4; u++) begin
        int a = 0;
        for (int n = 0; n < 4; n++) a += t8(u, n) * pix[4*r + n];
        rq[r][u] = rshift_round(a, 6);
      end
    for (int u = 0; u < 4; u++)
      for (int v = 0; v < 4; v++) begin
        int a = 0;
        for (int r = 0; r < 4; r++) a += t8(v, r) * rq[r][u];
        c[4*v + u] = rshift_round(a, 10);
      end
    return c;
  endfunction

  // inverse 2-D DCT: columns first (2 fraction bits kept), then rows, clip
  function automatic blk_t idct(blk_t c);
    int   m [4][4];
    blk_t p;
    for (int u = 0; u < 4; u++)
      for (int r = 0; r < 4; r++) begin
        int a = 0;
        for (int v = 0; v < 4; v++) a += t8(v, r) * c[4*v + u];
        m[r][u] = rshift_round(a, 6);
      end
    for (int r = 0; r < 4; r++)
      for (int x = 0; x < 4; x++) begin
        int a = 0, q;
        for (int u = 0; u < 4; u++) a += t8(u, x) * m[r][u];
        q = rshift_round(rshift_round(a, 6), 4);
        p[4*r + x] = (q < 0) ? 0 : (q > 255) ? 255 : q;
      end
    return p;
  endfunction

  // ---------------- CGBPZ ----------------
  function automatic int zbits(int r, int c);  // r, c = RMAX, CMAX (1..4)
    return r * c - 1;
  endfunction

  function automatic bit inzone(int i, int r, int c);
    return (i != 0) && (i / 4 < r) && (i % 4 < c);
  endfunction

  // bit-serial writer state
  typedef struct {
    bit [49:0] ac;
    int        pos;
  } wr_t;

  function automatic void put(ref wr_t w, input bit b);
    if (w.pos >= 0) begin
      w.ac[w.pos] = b;
      w.pos--;
    end
  endfunction

  function automatic bit [63:0] encode(blk_t c);
    int mag [16];
    bit sg [16];
    int zr [9], zc [9];
    int s, e, dc, acc, sr, sc, cost, used;
    bit any;
    wr_t w;
    w.ac = '0;
    w.pos = 49;
    dc = (c[0] + 2) >>> 2;
    if (dc < 0) dc = 0;
    if (dc > 255) dc = 255;
    any = 0;
    s = 0;
    for (int i = 1; i < 16; i++) begin
      mag[i] = (c[i] < 0) ? -c[i] : c[i];
      if (mag[i] > 511) mag[i] = 511;
      sg[i] = c[i] < 0;
    end
    for (int p = 0; p < 9; p++) begin
      zr[p] = 1;
      zc[p] = 1;
      for (int i = 1; i < 16; i++)
        if (mag[i][p]) begin
          if (i / 4 + 1 > zr[p]) zr[p] = i / 4 + 1;
          if (i % 4 + 1 > zc[p]) zc[p] = i % 4 + 1;
          any = 1;
          if (p > s) s = p;
        end
    end
    if (!any) return {8'(dc), 6'd63, 50'd0};
    // end plane: lowest plane whose usage still fits 50 bits
    acc = 0; sr = 1; sc = 1; e = s; used = 0;
    for (int p = s; p >= 0; p--) begin
      int nr, nc;
      nr = (zr[p] > sr) ? zr[p] : sr;
      nc = (zc[p] > sc) ? zc[p] : sc;
      cost = acc + 4 + zbits(zr[p], zc[p]) + zbits(nr, nc);
      if (cost > 50) break;
      acc += 4 + zbits(zr[p], zc[p]);
      sr = nr; sc = nc; e = p; used = cost;
    end
    for (int p = s; p >= e; p--) begin
      put(w, (zr[p] - 1) / 2); put(w, (zr[p] - 1) % 2);
      put(w, (zc[p] - 1) / 2); put(w, (zc[p] - 1) % 2);
    end
    for (int i = 1; i < 16; i++) if (inzone(i, sr, sc)) put(w, sg[i]);
    for (int p = s; p >= e; p--)
      for (int i = 1; i < 16; i++) if (inzone(i, zr[p], zc[p])) put(w, mag[i][p]);
    if (e > 0)
      for (int i = 1; i < 16; i++) if (inzone(i, sr, sc)) put(w, mag[i][e-1]);
    return {8'(dc), 6'(s * (s + 1) / 2 + e), w.ac};
  endfunction

  function automatic blk_t decode(bit [63:0] seg);
    blk_t c;
    int   mag [16];
    bit   sg [16], fcod [16];
    int   code, s, e, pos, sr, sc, used, nfill, k;
    int   zr [9], zc [9];
    c[0] = seg[63:56] * 4;
    for (int i = 1; i < 16; i++) begin mag[i] = 0; sg[i] = 0; fcod[i] = 0; c[i] = 0; end
    code = seg[55:50];
    if (code > 44) return c;
    s = 0;
    while ((s + 1) * (s + 2) / 2 <= code) s++;
    e = code - s * (s + 1) / 2;
    pos = 49;
    sr = 1; sc = 1; used = 0;
    for (int p = s; p >= e; p--) begin
      zr[p] = 1 + 2 * seg[pos] + seg[pos-1];
      zc[p] = 1 + 2 * seg[pos-2] + seg[pos-3];
      pos -= 4;
      if (zr[p] > sr) sr = zr[p];
      if (zc[p] > sc) sc = zc[p];
      used += 4 + zbits(zr[p], zc[p]);
    end
    used += zbits(sr, sc);
    for (int i = 1; i < 16; i++) if (inzone(i, sr, sc)) begin sg[i] = seg[pos]; pos--; end
    for (int p = s; p >= e; p--)
      for (int i = 1; i < 16; i++) if (inzone(i, zr[p], zc[p])) begin
        if (seg[pos]) mag[i] += (1 << p);
        pos--;
      end
    if (e > 0) begin
      nfill = 50 - used;
      k = 0;
      for (int i = 1; i < 16; i++) if (inzone(i, sr, sc) && k < nfill) begin
        if (seg[pos]) mag[i] += (1 << (e - 1));
        fcod[i] = 1;
        pos--;
        k++;
      end
    end
    for (int i = 1; i < 16; i++) begin
      int low;
      low = fcod[i] ? e - 1 : e;
      if (mag[i] != 0 && low > 0) mag[i] |= (1 << (low - 1));
      c[i] = sg[i] ? -mag[i] : mag[i];
    end
    return c;
  endfunction

  // AC-field bits a segment's zone fields announce (0 for no AC data);
  // a well-formed segment never announces more than 50
  function automatic int seg_used(bit [63:0] seg);
    int code, s, e, pos, sr, sc, used, zr, zc;
    code = seg[55:50];
    if (code > 44) return 0;
    s = 0;
    while ((s + 1) * (s + 2) / 2 <= code) s++;
    e = code - s * (s + 1) / 2;
    pos = 49; sr = 1; sc = 1; used = 0;
    for (int p = s; p >= e; p--) begin
      if (pos < 3) return 99;
      zr = 1 + 2 * seg[pos] + seg[pos-1];
      zc = 1 + 2 * seg[pos-2] + seg[pos-3];
      pos -= 4;
      if (zr > sr) sr = zr;
      if (zc > sc) sc = zc;
      used += 4 + zbits(zr, zc);
    end
    return used + zbits(sr, sc);
  endfunction

  // random test block: smooth, textured, flat or noisy
  function automatic blk_t rand_block(int kind);
    blk_t p;
    int base, gx, gy;
    base = $urandom_range(0, 255);
    gx = $urandom_range(0, 40) - 20;
    gy = $urandom_range(0, 40) - 20;
    for (int i = 0; i < 16; i++) begin
      int v;
      case (kind % 4)
        0: v = base + gx * (i % 4) + gy * (i / 4);
        1: v = base + int'($urandom_range(0, 30)) - 15;
        2: v = base;
        default: v = int'($urandom_range(0, 255));
      endcase
      p[i] = (v < 0) ? 0 : (v > 255) ? 255 : v;
    end
    return p;
  endfunction

endpackage
