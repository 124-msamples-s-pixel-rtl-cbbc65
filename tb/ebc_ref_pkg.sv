// ebc_ref_pkg: reference models used by the testbenches of the block coder.
//
// ebc_ref codes a code-block the textbook way, bit-plane after bit-plane and
// pass after pass, with a dynamic significance state, in stripe-causal mode.
// It records the (context, decision) symbols of every (plane, pass)
// codeword; uniform symbols use context 18. mq_ref is an integer model of the
// MQ encoder that turns such a symbol list into the terminated codeword.
package ebc_ref_pkg;

  class mq_ref;
    int QE[47] = '{'h5601,'h3401,'h1801,'h0AC1,'h0521,'h0221,'h5601,'h5401,'h4801,'h3801,
                   'h3001,'h2401,'h1C01,'h1601,'h5601,'h5401,'h5101,'h4801,'h3801,'h3401,
                   'h3001,'h2801,'h2401,'h2201,'h1C01,'h1801,'h1601,'h1401,'h1201,'h1101,
                   'h0AC1,'h09C1,'h08A1,'h0521,'h0441,'h02A1,'h0221,'h0141,'h0111,'h0085,
                   'h0049,'h0025,'h0015,'h0009,'h0005,'h0001,'h5601};
    int NMPS[47] = '{1,2,3,4,5,38,7,8,9,10,11,12,13,29,15,16,17,18,19,20,21,22,23,24,25,26,27,28,29,
                     30,31,32,33,34,35,36,37,38,39,40,41,42,43,44,45,45,46};
    int NLPS[47] = '{1,6,9,12,29,33,6,14,14,14,17,18,20,21,14,14,15,16,17,18,19,19,20,21,22,23,24,
                     25,26,27,28,29,30,31,32,33,34,35,36,37,38,39,40,41,42,43,46};
    int a, c, ct, b; bit first;
    int idx[19], mps[19];
    byte out[$];

    function new(); reset(); endfunction
    function void reset();
      a = 'h8000; c = 0; ct = 12; b = 0; first = 1; out.delete();
      foreach (idx[i]) begin idx[i] = (i == 0) ? 4 : (i == 17) ? 3 : (i == 18) ? 46 : 0; mps[i] = 0; end
    endfunction
    function void put(int v); if (!first) out.push_back(byte'(v)); first = 0; endfunction
    function void byteout();
      if (b == 'hFF) begin put(b); b = c >> 20; c &= 'hFFFFF; ct = 7; end
      else if (c < 'h8000000) begin put(b); b = c >> 19; c &= 'h7FFFF; ct = 8; end
      else begin
        b++;
        if (b == 'hFF) begin c &= 'h7FFFFFF; put(b); b = c >> 20; c &= 'hFFFFF; ct = 7; end
        else begin put(b); b = (c >> 19) & 'hFF; c &= 'h7FFFF; ct = 8; end
      end
    endfunction
    function void renorm();
      do begin a = (a << 1) & 'hFFFF; c = (c << 1) & 'hFFFFFFF; ct--; if (ct == 0) byteout(); end
      while ((a & 'h8000) == 0);
    endfunction
    function void code(int cx, int d);
      int q, i;
      i = idx[cx]; q = QE[i];
      a -= q;
      if (d == mps[cx]) begin
        if ((a & 'h8000) == 0) begin
          if (a < q) a = q; else c += q;
          if (cx != 18) idx[cx] = NMPS[i];
          renorm();
        end else c += q;
      end else begin
        if (a < q) c += q; else a = q;
        if (cx != 18) begin if (i == 0 || i == 6 || i == 14) mps[cx] = 1 - mps[cx]; idx[cx] = NLPS[i]; end
        renorm();
      end
    endfunction
    function void flush();
      int t;
      t = c + a; c = c | 'hFFFF; if (c >= t) c -= 'h8000;
      c = (c << ct) & 'hFFFFFFF; byteout(); c = (c << ct) & 'hFFFFFFF; byteout();
      if (b != 'hFF) put(b);
    endfunction
  endclass

  class ebc_ref;
    int W, H, band;             // band: 0 LL, 1 HL, 2 LH, 3 HH
    int mag[64][64], sgn[64][64];
    bit sig[64][64], vis[64][64], refd[64][64];
    int syms[9][3][$];          // ctx*2 + d

    function new(int w, int h, int bd); W = w; H = h; band = bd; endfunction

    // Significance of (y, x) as seen from row yc: outside the block or in
    // a later stripe counts as insignificant.
    function bit s(int y, int x, int yc);
      if (x < 0 || x >= W || y < 0 || y >= H) return 0;
      if (y / 4 > yc / 4) return 0;
      return sig[y][x];
    endfunction
    function int sv(int y, int x, int yc);  // +1, -1, 0
      if (!s(y, x, yc)) return 0;
      return sgn[y][x] ? -1 : 1;
    endfunction

    function int zc(int y, int x);
      int h, v, d, hv, t;
      h = s(y, x-1, y) + s(y, x+1, y);
      v = s(y-1, x, y) + s(y+1, x, y);
      d = s(y-1, x-1, y) + s(y-1, x+1, y) + s(y+1, x-1, y) + s(y+1, x+1, y);
      if (band == 3) begin
        hv = h + v;
        if (d >= 3) return 8;
        if (d == 2) return (hv >= 1) ? 7 : 6;
        if (d == 1) return (hv >= 2) ? 5 : (hv == 1) ? 4 : 3;
        return (hv >= 2) ? 2 : (hv == 1) ? 1 : 0;
      end
      if (band == 1) begin t = h; h = v; v = t; end
      if (h == 2) return 8;
      if (h == 1) return (v >= 1) ? 7 : (d >= 1) ? 6 : 5;
      if (v == 2) return 4;
      if (v == 1) return 3;
      return (d >= 2) ? 2 : (d == 1) ? 1 : 0;
    endfunction

    // Sign symbol: returns ctx*2 + (sign xor xorbit).
    function int sc(int y, int x);
      int hc, vc, ctx, xb;
      hc = sv(y, x-1, y) + sv(y, x+1, y); hc = (hc > 0) ? 1 : (hc < 0) ? -1 : 0;
      vc = sv(y-1, x, y) + sv(y+1, x, y); vc = (vc > 0) ? 1 : (vc < 0) ? -1 : 0;
      // Table of the standard, by (H, V).
      if (hc == 1)       begin ctx = (vc == 1) ? 13 : (vc == 0) ? 12 : 11; xb = 0; end
      else if (hc == 0)  begin ctx = (vc == 0) ? 9 : 10; xb = (vc == -1); end
      else               begin ctx = (vc == 1) ? 11 : (vc == 0) ? 12 : 13; xb = 1; end
      return ctx*2 + (sgn[y][x] ^ xb);
    endfunction

    function bit anysig(int y, int x);
      return s(y, x-1, y) | s(y, x+1, y) | s(y-1, x, y) | s(y+1, x, y) |
             s(y-1, x-1, y) | s(y-1, x+1, y) | s(y+1, x-1, y) | s(y+1, x+1, y);
    endfunction

    function void run();
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin sig[y][x] = 0; refd[y][x] = 0; end
      for (int p = 8; p >= 0; p--) begin
        for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) vis[y][x] = 0;
        // Significance propagation.
        for (int s0 = 0; s0 < H; s0 += 4) for (int x = 0; x < W; x++) for (int y = s0; y < s0+4; y++)
          if (!sig[y][x] && anysig(y, x)) begin
            int bit_ = (mag[y][x] >> p) & 1;
            syms[p][0].push_back(zc(y, x)*2 + bit_);
            if (bit_) begin syms[p][0].push_back(sc(y, x)); sig[y][x] = 1; end
            vis[y][x] = 1;
          end
        // Magnitude refinement.
        for (int s0 = 0; s0 < H; s0 += 4) for (int x = 0; x < W; x++) for (int y = s0; y < s0+4; y++)
          if (sig[y][x] && !vis[y][x]) begin
            int ctx = refd[y][x] ? 16 : anysig(y, x) ? 15 : 14;
            syms[p][1].push_back(ctx*2 + ((mag[y][x] >> p) & 1));
            refd[y][x] = 1;
          end
        // Clean-up.
        for (int s0 = 0; s0 < H; s0 += 4) for (int x = 0; x < W; x++) begin
          int y0 = s0;
          bit rl = 1;
          for (int y = s0; y < s0+4; y++) if (sig[y][x] || vis[y][x] || anysig(y, x)) rl = 0;
          if (rl) begin
            int k = -1;
            for (int y = s0+3; y >= s0; y--) if ((mag[y][x] >> p) & 1) k = y - s0;
            if (k < 0) begin syms[p][2].push_back(17*2 + 0); y0 = s0 + 4; end
            else begin
              syms[p][2].push_back(17*2 + 1);
              syms[p][2].push_back(18*2 + (k >> 1)); syms[p][2].push_back(18*2 + (k & 1));
              syms[p][2].push_back(sc(s0+k, x)); sig[s0+k][x] = 1;
              y0 = s0 + k + 1;
            end
          end
          for (int y = y0; y < s0+4; y++)
            if (!sig[y][x] && !vis[y][x]) begin
              int bit_ = (mag[y][x] >> p) & 1;
              syms[p][2].push_back(zc(y, x)*2 + bit_);
              if (bit_) begin syms[p][2].push_back(sc(y, x)); sig[y][x] = 1; end
            end
        end
      end
    endfunction
  endclass

endpackage
