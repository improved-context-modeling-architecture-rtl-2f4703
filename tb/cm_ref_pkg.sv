// cm_ref_pkg: sequential reference model of JPEG2000 tier-1 context
// formation, used by the testbenches to check the pass-pipelined hardware.
//
// It codes a code block the textbook way: for each bit-plane, the whole
// significance propagation pass, then the whole magnitude refinement pass,
// then the whole cleanup pass, each in stripe / column / row order, with
// vertically causal context formation (samples of the next stripe count as
// insignificant). The contexts are looked up from explicit tables, written
// independently of the RTL operators. Results are three queues of
// (bit-plane, context, decision) triples, one per pass.
package cm_ref_pkg;

  typedef struct {
    int bp;
    int cx;
    int d;
  } ref_pair_t;

  // zero-coding table, indexed by band (0 LL, 1 HL, 2 LH, 3 HH)
  function automatic int ref_zc(int band, int h, int v, int d);
    int a, b;
    if (band == 3) begin
      case (d)
        0: return (h + v == 0) ? 0 : (h + v == 1) ? 1 : 2;
        1: return (h + v == 0) ? 3 : (h + v == 1) ? 4 : 5;
        2: return (h + v == 0) ? 6 : 7;
        default: return 8;
      endcase
    end
    a = (band == 1) ? v : h;
    b = (band == 1) ? h : v;
    case (a)
      2: return 8;
      1: return (b > 0) ? 7 : (d > 0) ? 6 : 5;
      default: return (b == 2) ? 4 : (b == 1) ? 3 : (d >= 2) ? 2 : (d == 1) ? 1 : 0;
    endcase
  endfunction

  // sign-coding table: returns context, sets xor bit
  function automatic int ref_sc(int hc, int vc, output int xr);
    int t [3][3] = '{'{13, 12, 11}, '{10, 9, 10}, '{11, 12, 13}};  // [1-hc][1-vc]
    int x [3][3] = '{'{0, 0, 0}, '{0, 0, 1}, '{1, 1, 1}};
    xr = x[1-hc][1-vc];
    return t[1-hc][1-vc];
  endfunction

  class cm_ref;
    int W, H, band, nbp;
    int mag [][];
    int sgn [][];
    bit sig [][];
    bit refd [][];
    bit vis [][];
    ref_pair_t q [3][$];
    // per issued stripe column (key = issue index) and pass: coded rows,
    // run mode, and per coded sample the neighbour counts h*100 + v*10 + d
    bit [3:0] cmask [3][int];
    bit       runf [int];
    int       nbc [3][int];
    // mechanism counters
    int n_run, n_run_int, n_spp_sig, n_mr_first, n_mr_later, n_cup_sig;

    function new(int w, int h);
      W = w; H = h;
      mag = new[H]; sgn = new[H]; sig = new[H]; refd = new[H]; vis = new[H];
      foreach (mag[y]) begin
        mag[y] = new[W]; sgn[y] = new[W]; sig[y] = new[W]; refd[y] = new[W]; vis[y] = new[W];
      end
    endfunction

    function automatic bit s_at(int y, int x, int yc);
      if (y < 0 || x < 0 || x >= W || y >= H) return 0;
      if (y >= (yc / 4 + 1) * 4) return 0;  // next stripe: causal
      return sig[y][x];
    endfunction

    function automatic int c_at(int y, int x, int yc);  // sign contribution
      if (!s_at(y, x, yc)) return 0;
      return sgn[y][x] ? -1 : 1;
    endfunction

    function automatic void nbrs(int y, int x, output int h, output int v, output int d);
      h = s_at(y, x-1, y) + s_at(y, x+1, y);
      v = s_at(y-1, x, y) + s_at(y+1, x, y);
      d = s_at(y-1, x-1, y) + s_at(y-1, x+1, y) + s_at(y+1, x-1, y) + s_at(y+1, x+1, y);
    endfunction

    function automatic void put(int p, int bp, int cx, int d);
      ref_pair_t e;
      e.bp = bp; e.cx = cx; e.d = d;
      q[p].push_back(e);
    endfunction

    function automatic void code_sign(int p, int bp, int y, int x);
      int hs, vs, hc, vc, xr, cx;
      hs = c_at(y, x-1, y) + c_at(y, x+1, y);
      vs = c_at(y-1, x, y) + c_at(y+1, x, y);
      hc = (hs > 0) ? 1 : (hs < 0) ? -1 : 0;
      vc = (vs > 0) ? 1 : (vs < 0) ? -1 : 0;
      cx = ref_sc(hc, vc, xr);
      put(p, bp, cx, sgn[y][x] ^ xr);
    endfunction

    function automatic int key(int bp, int s, int x);
      return ((nbp - 1 - bp) * (H / 4) + s / 4) * W + x;
    endfunction

    function automatic void mark(int p, int bp, int y, int x, int h, int v, int d);
      int k;
      k = key(bp, y - y % 4, x);
      if (!cmask[p].exists(k)) cmask[p][k] = '0;
      cmask[p][k][y % 4] = 1'b1;
      nbc[p][k * 4 + y % 4] = h * 100 + v * 10 + d;
    endfunction

    function automatic void run();
      int h, v, d, b, m;
      m = 0;
      foreach (mag[y, x]) m |= mag[y][x];
      nbp = 0;
      for (int i = 0; i < 32; i++) if ((m >> i) & 1) nbp = i + 1;
      foreach (sig[y, x]) begin sig[y][x] = 0; refd[y][x] = 0; vis[y][x] = 0; end
      for (int bp = nbp - 1; bp >= 0; bp--) begin
        // SPP
        for (int s = 0; s < H; s += 4)
          for (int x = 0; x < W; x++)
            for (int y = s; y < s + 4; y++) begin
              nbrs(y, x, h, v, d);
              if (!sig[y][x] && (h + v + d) > 0) begin
                b = (mag[y][x] >> bp) & 1;
                put(0, bp, ref_zc(band, h, v, d), b);
                mark(0, bp, y, x, h, v, d);
                vis[y][x] = 1;
                if (b) begin sig[y][x] = 1; code_sign(0, bp, y, x); n_spp_sig++; end
              end
            end
        // MRP
        for (int s = 0; s < H; s += 4)
          for (int x = 0; x < W; x++)
            for (int y = s; y < s + 4; y++)
              if (sig[y][x] && !vis[y][x]) begin
                nbrs(y, x, h, v, d);
                mark(1, bp, y, x, h, v, d);
                put(1, bp, refd[y][x] ? 16 : (h + v + d > 0) ? 15 : 14, (mag[y][x] >> bp) & 1);
                if (refd[y][x]) n_mr_later++; else n_mr_first++;
                refd[y][x] = 1;
              end
        // CUP
        for (int s = 0; s < H; s += 4)
          for (int x = 0; x < W; x++) begin
            int y0;
            bit rm;
            y0 = s;
            rm = 1;
            for (int y = s; y < s + 4; y++) begin
              nbrs(y, x, h, v, d);
              if (sig[y][x] || vis[y][x] || (h + v + d) > 0) rm = 0;
            end
            runf[key(bp, s, x)] = rm;
            if (rm) begin
              int k;
              cmask[2][key(bp, s, x)] = 4'hf;
              n_run++;
              k = -1;
              for (int y = s + 3; y >= s; y--) if ((mag[y][x] >> bp) & 1) k = y - s;
              put(2, bp, 17, k >= 0);
              if (k < 0) continue;
              n_run_int++;
              put(2, bp, 18, k / 2);
              put(2, bp, 18, k % 2);
              sig[s+k][x] = 1;
              code_sign(2, bp, s + k, x);
              y0 = s + k + 1;
            end
            for (int y = y0; y < s + 4; y++)
              if (!sig[y][x] && !vis[y][x]) begin
                nbrs(y, x, h, v, d);
                mark(2, bp, y, x, h, v, d);
                b = (mag[y][x] >> bp) & 1;
                put(2, bp, ref_zc(band, h, v, d), b);
                if (b) begin sig[y][x] = 1; code_sign(2, bp, y, x); n_cup_sig++; end
              end
          end
        foreach (vis[y, x]) vis[y][x] = 0;
      end
    endfunction
  endclass

endpackage
