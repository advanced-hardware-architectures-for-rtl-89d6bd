// tdec_ref_pkg: reference model for the turbo decoder testbenches.
//
// Written independently of the RTL with plain integer arithmetic: the code
// trellis (feedback 1+D^2+D^3, parity 1+D+D^3), the max-Log-MAP recursions
// with the same normalisation (state 0 = 0) and saturation (12-bit metrics),
// the extrinsic scaling floor(3x/4) saturated to +-63, the ARP interleaver
// PI(i) = (9 i + S[i mod 4]) mod K, the half-iteration stage (four 32-bit
// sub-blocks with wrap-around border metrics) and a tail-biting turbo encoder.
package tdec_ref_pkg;

  localparam int RK   = 128;
  localparam int RX   = 4;
  localparam int RW   = 32;
  localparam int RN   = 16;
  localparam int SMAX = 2047;
  localparam int SMIN = -2048;

  typedef int vec8_t [8];
  typedef int vec16_t [16];

  // ------------------------------------------------------------ trellis
  // state = 4*r1 + 2*r2 + r3, r1 the newest register bit
  function automatic void step(input int s, input int u, output int ns, output int p);
    int r1, r2, r3, a;
    r1 = (s >> 2) & 1; r2 = (s >> 1) & 1; r3 = s & 1;
    a  = u ^ r2 ^ r3;
    p  = a ^ r1 ^ r3;
    ns = 4 * a + 2 * r1 + r2;
  endfunction

  // radix-4 transition: first bit u0, second u1
  function automatic void step2(input int s, input int u0, input int u1,
                                output int ns, output int p0, output int p1);
    int m;
    step(s, u0, m, p0);
    step(m, u1, ns, p1);
  endfunction

  function automatic int sat(input int x, input int lo, input int hi);
    return (x < lo) ? lo : (x > hi) ? hi : x;
  endfunction

  function automatic int floordiv4(input int x);
    return (x >= 0) ? x / 4 : -((-x + 3) / 4);
  endfunction

  function automatic int esf(input int x);
    return sat(floordiv4(3 * x), -63, 63);
  endfunction

  // branch metric of bits (u0,u1,p0,p1): sum of the LLRs of the zero bits
  function automatic int gam(input int ls0, la0, ls1, la1, lp0, lp1,
                             input int u0, u1, p0, p1);
    int g;
    g = 0;
    if (u0 == 0) g += ls0 + la0;
    if (u1 == 0) g += ls1 + la1;
    if (p0 == 0) g += lp0;
    if (p1 == 0) g += lp1;
    return g;
  endfunction

  function automatic vec16_t gam_vec(input int ls0, la0, ls1, la1, lp0, lp1);
    vec16_t g;
    for (int u0 = 0; u0 < 2; u0++)
      for (int u1 = 0; u1 < 2; u1++)
        for (int p0 = 0; p0 < 2; p0++)
          for (int p1 = 0; p1 < 2; p1++)
            g[8*u0 + 4*u1 + 2*p0 + p1] = gam(ls0, la0, ls1, la1, lp0, lp1, u0, u1, p0, p1);
    return g;
  endfunction

  function automatic vec8_t fwd(input vec8_t a, input vec16_t g);
    vec8_t r;
    int best [8];
    for (int t = 0; t < 8; t++) best[t] = -100000;
    for (int s = 0; s < 8; s++)
      for (int u0 = 0; u0 < 2; u0++)
        for (int u1 = 0; u1 < 2; u1++) begin
          int ns, p0, p1, c;
          step2(s, u0, u1, ns, p0, p1);
          c = a[s] + g[8*u0 + 4*u1 + 2*p0 + p1];
          if (c > best[ns]) best[ns] = c;
        end
    for (int t = 0; t < 8; t++) r[t] = sat(best[t] - best[0], SMIN, SMAX);
    return r;
  endfunction

  function automatic vec8_t bwd(input vec8_t bn, input vec16_t g);
    vec8_t r;
    int best [8];
    for (int s = 0; s < 8; s++) begin
      best[s] = -100000;
      for (int u0 = 0; u0 < 2; u0++)
        for (int u1 = 0; u1 < 2; u1++) begin
          int ns, p0, p1, c;
          step2(s, u0, u1, ns, p0, p1);
          c = bn[ns] + g[8*u0 + 4*u1 + 2*p0 + p1];
          if (c > best[s]) best[s] = c;
        end
    end
    for (int s = 0; s < 8; s++) r[s] = sat(best[s] - best[0], SMIN, SMAX);
    return r;
  endfunction

  // soft output of one radix-4 step: extrinsic (scaled) and hard decisions
  function automatic void llr(input vec8_t a, input vec16_t g, input vec8_t bn,
                              input int lsa0, input int lsa1,
                              output int e0, output int e1, output int h0, output int h1);
    int mx [2][2];   // [bit][value]
    for (int b = 0; b < 2; b++) for (int v = 0; v < 2; v++) mx[b][v] = -100000;
    for (int s = 0; s < 8; s++)
      for (int u0 = 0; u0 < 2; u0++)
        for (int u1 = 0; u1 < 2; u1++) begin
          int ns, p0, p1, m;
          step2(s, u0, u1, ns, p0, p1);
          m = a[s] + g[8*u0 + 4*u1 + 2*p0 + p1] + bn[ns];
          if (m > mx[0][u0]) mx[0][u0] = m;
          if (m > mx[1][u1]) mx[1][u1] = m;
        end
    h0 = (mx[0][0] - mx[0][1]) < 0;
    h1 = (mx[1][0] - mx[1][1]) < 0;
    e0 = esf(mx[0][0] - mx[0][1] - lsa0);
    e1 = esf(mx[1][0] - mx[1][1] - lsa1);
  endfunction

  // one sub-block of RW bits; lp is the parity the decoder uses
  function automatic void subblock(input int ls [RW], input int la [RW], input int lp [RW],
                                   input vec8_t a0, input vec8_t bn,
                                   output int ext [RW], output int hd [RW],
                                   output vec8_t a_end, output vec8_t b_start);
    vec8_t  al [RN+1];
    vec8_t  be [RN+1];
    vec16_t g  [RN];
    for (int j = 0; j < RN; j++)
      g[j] = gam_vec(ls[2*j], la[2*j], ls[2*j+1], la[2*j+1], lp[2*j], lp[2*j+1]);
    al[0]  = a0;
    be[RN] = bn;
    for (int j = 0; j < RN; j++) al[j+1] = fwd(al[j], g[j]);
    for (int j = RN - 1; j >= 0; j--) be[j] = bwd(be[j+1], g[j]);
    for (int j = 0; j < RN; j++)
      llr(al[j], g[j], be[j+1], ls[2*j] + la[2*j], ls[2*j+1] + la[2*j+1],
          ext[2*j], ext[2*j+1], hd[2*j], hd[2*j+1]);
    a_end   = al[RN];
    b_start = be[0];
  endfunction

  // ----------------------------------------------------- frames and ARP
  // frame layouts of a 128-bit slot: 0: 128, 1: 64+64, 2: 4x32, 3: 64+32+32
  function automatic int fbase(input int cfg, input int pos);
    case (cfg)
      0: return 0;
      1: return pos < 64 ? 0 : 64;
      2: return pos - pos % 32;
      default: return pos < 64 ? 0 : pos - pos % 32;
    endcase
  endfunction

  function automatic int flen(input int cfg, input int pos);
    case (cfg)
      0: return 128;
      1: return 64;
      2: return 32;
      default: return pos < 64 ? 64 : 32;
    endcase
  endfunction

  function automatic int arp(input int k, input int i);
    int s [4] = '{3, 13, 27, 5};
    return (9 * i + s[i % 4]) % k;
  endfunction

  // ------------------------------------------------------------ stage
  typedef struct {
    int    sys [RK];
    int    p1  [RK];
    int    p2  [RK];
    int    ext [RK];
    int    hd  [RK];
  } slot_t;

  typedef struct {
    vec8_t a_end   [RX];
    vec8_t b_start [RX];
  } nii_r_t;

  // perm: 0 none, 1 PI, 2 PI inverse
  function automatic slot_t permute(input slot_t s, input int cfg, input int perm);
    slot_t r;
    r = s;
    if (perm == 0) return r;
    for (int i = 0; i < RK; i++) begin
      int b, k, src, dst;
      b = fbase(cfg, i);
      k = flen(cfg, i);
      if (perm == 1) begin dst = i; src = b + arp(k, i - b); end
      else begin src = i; dst = b + arp(k, i - b); end
      r.sys[dst] = s.sys[src];
      r.ext[dst] = s.ext[src];
      r.hd[dst]  = s.hd[src];
    end
    return r;
  endfunction

  function automatic void hi_stage(input slot_t in, input int cfg, input int use_p2, input int perm,
                                   input nii_r_t nuse, output slot_t out, output nii_r_t own);
    slot_t raw;
    raw = in;
    for (int x = 0; x < RX; x++) begin
      int ls [RW], la [RW], lp [RW], e [RW], h [RW];
      int first, last, sa, sb;
      vec8_t ae, bs;
      first = fbase(cfg, x * RW) / RW;
      last  = (fbase(cfg, x * RW) + flen(cfg, x * RW)) / RW - 1;
      sa = (x == first) ? last : x - 1;
      sb = (x == last) ? first : x + 1;
      for (int i = 0; i < RW; i++) begin
        ls[i] = in.sys[x*RW + i];
        la[i] = in.ext[x*RW + i];
        lp[i] = use_p2 ? in.p2[x*RW + i] : in.p1[x*RW + i];
      end
      subblock(ls, la, lp, nuse.a_end[sa], nuse.b_start[sb], e, h, ae, bs);
      for (int i = 0; i < RW; i++) begin
        raw.ext[x*RW + i] = e[i];
        raw.hd[x*RW + i]  = h[i];
      end
      own.a_end[x]   = ae;
      own.b_start[x] = bs;
    end
    out = permute(raw, cfg, perm);
  endfunction

  function automatic nii_r_t nii_zero();
    nii_r_t n;
    for (int x = 0; x < RX; x++)
      for (int s = 0; s < 8; s++) begin
        n.a_end[x][s]   = 0;
        n.b_start[x][s] = 0;
      end
    return n;
  endfunction

  // iteration unrolled decoder: n_hi half-iterations, returns the slot
  // after the last one (natural order when n_hi is even)
  function automatic slot_t decode(input slot_t in, input int cfg, input int n_hi);
    slot_t  s;
    nii_r_t n_prev, n_prev2, n_own;
    s       = in;
    n_prev  = nii_zero();
    n_prev2 = nii_zero();
    for (int h = 0; h < n_hi; h++) begin
      int perm;
      perm = (h % 2 == 1) ? 2 : (h == n_hi - 1) ? 0 : 1;
      hi_stage(s, cfg, h % 2, perm, n_prev2, s, n_own);
      n_prev2 = n_prev;
      n_prev  = n_own;
    end
    return s;
  endfunction

  // --------------------------------------------------------- encoder
  // tail-biting RSC: the start state is the one the encoder returns to
  function automatic void rsc(input int u [RK], input int k, output int p [RK]);
    int s0;
    s0 = 0;
    for (int c = 0; c < 8; c++) begin
      int s, ns, pp;
      s = c;
      for (int i = 0; i < k; i++) begin step(s, u[i], ns, pp); s = ns; end
      if (s == c) s0 = c;
    end
    for (int i = 0; i < k; i++) begin
      int ns;
      step(s0, u[i], ns, p[i]);
      s0 = ns;
    end
  endfunction

  // encode one frame of k bits at position base of the slot bit arrays
  function automatic void turbo_encode(input int data [RK], input int base, input int k,
                                       inout int p1 [RK], inout int p2 [RK]);
    int u [RK], ui [RK], q [RK];
    for (int i = 0; i < RK; i++) begin u[i] = 0; ui[i] = 0; end
    for (int i = 0; i < k; i++) u[i] = data[base + i];
    for (int i = 0; i < k; i++) ui[i] = u[arp(k, i)];
    rsc(u, k, q);
    for (int i = 0; i < k; i++) p1[base + i] = q[i];
    rsc(ui, k, q);
    for (int i = 0; i < k; i++) p2[base + i] = q[i];
  endfunction

  // channel LLR of a bit: +amp for 0, -amp for 1, plus noise in [-nz, nz]
  function automatic int chan_llr(input int bit_v, input int amp, input int nz);
    int n;
    n = (nz == 0) ? 0 : int'($urandom_range(2 * nz, 0)) - nz;
    return sat((bit_v ? -amp : amp) + n, -31, 31);
  endfunction

endpackage
