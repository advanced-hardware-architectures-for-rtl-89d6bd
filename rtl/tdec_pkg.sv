// tdec_pkg: types, constants and constant functions shared by the turbo decoder.
//
// The decoder works on frames of up to K_MAX = 128 bits, split over N_XE = 4
// X-elements of W_XE = 32 bits each (spatial parallelism 4). Each X-element runs
// a radix-4 max-Log-MAP over its sub-block, so it has N_STEP = 16 trellis steps.
// Channel values are 6-bit and extrinsic values 7-bit two's complement LLRs with
// the convention LLR = ln(P(bit=0)/P(bit=1)): a positive value favours a 0.
//
// Component code: 8-state recursive systematic code with feedback 1+D^2+D^3 and
// feed-forward 1+D+D^3 (the LTE constituent code), tail-biting. State bit 2 is
// the most recent register. This code is an assumption of this design; the
// interleaver (ARP, P=9, S={3,13,27,5}, Q=4), the 6/7-bit quantisation, radix-4,
// ESF = 0.75, NII and tail-biting follow the decoder description.
package tdec_pkg;

  parameter int K_MAX  = 128;           // largest frame size
  parameter int N_XE   = 4;             // X-elements per half-iteration stage
  parameter int W_XE   = K_MAX / N_XE;  // bits per X-element sub-block
  parameter int N_STEP = W_XE / 2;      // radix-4 trellis steps per sub-block
  parameter int NSTATE = 8;

  parameter int LS_W  = 6;   // channel value width
  parameter int EXT_W = 7;   // extrinsic value width
  parameter int LSA_W = 8;   // systematic + a-priori
  parameter int GAM_W = 10;  // radix-4 branch metric
  parameter int SM_W  = 12;  // normalised state metric
  parameter int MET_W = 14;  // alpha + gamma + beta

  // ARP interleaver: PI(i) = (P*i + S[i mod Q]) mod K
  parameter int ARP_P = 9;
  parameter int ARP_Q = 4;
  parameter int ARP_S [ARP_Q] = '{3, 13, 27, 5};

  typedef logic signed [LS_W-1:0]  ch_t;
  typedef logic signed [EXT_W-1:0] ext_t;
  typedef logic signed [LSA_W-1:0] lsa_t;
  typedef logic signed [GAM_W-1:0] gam_t;
  typedef logic signed [SM_W-1:0]  sm_t;
  typedef logic signed [MET_W-1:0] met_t;

  typedef gam_t gam_vec_t [16];      // index {u0,u1,p0,p1}
  typedef sm_t  sm_vec_t  [NSTATE];

  // channel values of one bit position
  typedef struct packed {
    ch_t sys;
    ch_t p1;
    ch_t p2;
  } chan_t;

  // everything one bit position carries between half-iteration stages
  typedef struct packed {
    chan_t chan;
    ext_t  ext;   // extrinsic of the last HI = a-priori of the next one
    logic  hd;    // hard decision of the last HI
  } pos_t;

  // border state metrics of one X-element, kept for next iteration initialisation
  typedef struct packed {
    logic [NSTATE-1:0][SM_W-1:0] alpha_end;   // forward metric after the last step
    logic [NSTATE-1:0][SM_W-1:0] beta_start;  // backward metric before the first step
  } nii_t;

  // frame configurations of the 128-bit frame slot
  typedef enum logic [1:0] {
    CFG_128      = 2'd0,
    CFG_64_64    = 2'd1,
    CFG_32X4     = 2'd2,
    CFG_64_32_32 = 2'd3
  } cfg_e;

  // permutation applied at the output of a half-iteration stage
  typedef enum logic [1:0] {
    PERM_NONE   = 2'd0,
    PERM_PI     = 2'd1,
    PERM_PI_INV = 2'd2
  } perm_e;

  // ---------------------------------------------------------------- trellis
  function automatic logic [2:0] trel_next(input logic [2:0] s, input logic u);
    logic a;
    a = u ^ s[1] ^ s[0];
    return {a, s[2], s[1]};
  endfunction

  function automatic logic trel_par(input logic [2:0] s, input logic u);
    logic a;
    a = u ^ s[1] ^ s[0];
    return a ^ s[2] ^ s[0];
  endfunction

  // radix-4: two bits u = {u0,u1}, u0 first
  function automatic logic [2:0] r4_next(input logic [2:0] s, input logic [1:0] u);
    return trel_next(trel_next(s, u[1]), u[0]);
  endfunction

  // parity pair {p0,p1} of a radix-4 transition
  function automatic logic [1:0] r4_par(input logic [2:0] s, input logic [1:0] u);
    return {trel_par(s, u[1]), trel_par(trel_next(s, u[1]), u[0])};
  endfunction

  // ------------------------------------------------------------- arithmetic
  function automatic sm_t sat_sm(input logic signed [MET_W:0] x);
    localparam logic signed [MET_W:0] MAXV = (MET_W+1)'((1 << (SM_W-1)) - 1);
    localparam logic signed [MET_W:0] MINV = -(MET_W+1)'(1 << (SM_W-1));
    if (x > MAXV) return sm_t'(MAXV);
    if (x < MINV) return sm_t'(MINV);
    return sm_t'(x);
  endfunction

  // extrinsic scaling by 0.75 (floor of 3x/4), saturated to EXT_W bits
  function automatic ext_t esf_scale(input logic signed [MET_W+2:0] x);
    logic signed [MET_W+4:0] y;
    y = ((MET_W+5)'(x) * 3) >>> 2;
    if (y > (MET_W+5)'((1 << (EXT_W-1)) - 1)) return ext_t'((1 << (EXT_W-1)) - 1);
    if (y < -(MET_W+5)'((1 << (EXT_W-1)) - 1)) return ext_t'(-((1 << (EXT_W-1)) - 1));
    return ext_t'(y);
  endfunction

  function automatic ch_t par_sel(input chan_t c, input logic use_p2);
    return use_p2 ? c.p2 : c.p1;
  endfunction

  // ------------------------------------------------------ frame configuration
  // first bit position of the frame that holds position pos
  function automatic int frame_base(input cfg_e cfg, input int pos);
    case (cfg)
      CFG_128:      return 0;
      CFG_64_64:    return (pos / 64) * 64;
      CFG_32X4:     return (pos / 32) * 32;
      default:      return (pos < 64) ? 0 : (pos / 32) * 32;  // CFG_64_32_32
    endcase
  endfunction

  function automatic int frame_len(input cfg_e cfg, input int pos);
    case (cfg)
      CFG_128:      return 128;
      CFG_64_64:    return 64;
      CFG_32X4:     return 32;
      default:      return (pos < 64) ? 64 : 32;
    endcase
  endfunction

  function automatic int arp(input int k, input int i);
    return (ARP_P * i + ARP_S[i % ARP_Q]) % k;
  endfunction

  function automatic int arp_inv(input int k, input int m);
    for (int i = 0; i < k; i++)
      if (arp(k, i) == m) return i;
    return 0;
  endfunction

  // source position of output position o after the permutation
  function automatic int perm_src(input cfg_e cfg, input perm_e perm, input int o);
    int base, len;
    base = frame_base(cfg, o);
    len  = frame_len(cfg, o);
    if (perm == PERM_PI)     return base + arp(len, o - base);
    if (perm == PERM_PI_INV) return base + arp_inv(len, o - base);
    return o;
  endfunction

  // first / last X-element of the frame that X-element x belongs to
  function automatic int xe_first(input cfg_e cfg, input int x);
    return frame_base(cfg, x * W_XE) / W_XE;
  endfunction

  function automatic int xe_last(input cfg_e cfg, input int x);
    return (frame_base(cfg, x * W_XE) + frame_len(cfg, x * W_XE)) / W_XE - 1;
  endfunction

endpackage
