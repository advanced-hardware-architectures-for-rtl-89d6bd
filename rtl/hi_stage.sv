// hi_stage: one fully pipelined half-iteration (HI) stage.
//
// A frame slot of K_MAX = 128 positions is split over N_XE = 4 X-elements of
// 32 positions each; they decode in parallel and a new slot enters every
// cycle. The stage latency is N_STEP = 16 cycles.
//
// Around the X-elements:
//  * the configuration FIFO carries valid, frame configuration, output
//    permutation and a user tag alongside the data, and drives the
//    (de-)interleaver multiplexers at the stage output;
//  * next iteration initialisation (NII): the border state metrics an X-element
//    starts from are those its neighbours reached in the previous iteration of
//    the same component decoder (nii_use, from two stages back). The forward
//    metric of X-element x starts from the end metric of x-1 and the backward
//    metric from the start metric of x+1; at the ends of a frame they wrap
//    around inside the frame (tail-biting). All-zero nii_use means no prior
//    knowledge (first iteration);
//  * nii_carry_in (the previous stage's own border metrics) is delayed by the
//    stage latency and handed on as nii_carry_out, so that the next stage
//    receives metrics from two stages back in step with its frame.
//
// in_use_p2 selects parity 2 (second component decoder). out_pos is the
// stage result after the permutation in_perm; out_hd_raw are the hard
// decisions before it. nii_own holds this stage's border metrics, aligned
// with out_pos.
module hi_stage
  import tdec_pkg::*;
#(
  parameter int TAG_W = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  cfg_e             in_cfg,
  input  logic             in_use_p2,
  input  perm_e            in_perm,
  input  logic [TAG_W-1:0] in_tag,
  input  pos_t             in_pos        [K_MAX],
  input  nii_t             nii_use       [N_XE],
  input  nii_t             nii_carry_in  [N_XE],
  output logic             out_valid,
  output cfg_e             out_cfg,
  output logic [TAG_W-1:0] out_tag,
  output pos_t             out_pos       [K_MAX],
  output logic             out_hd_raw    [K_MAX],
  output nii_t             nii_own       [N_XE],
  output nii_t             nii_carry_out [N_XE]
);
  localparam int CW = 1 + 2 + 2 + TAG_W;

  // ---------------------------------------------------------- config FIFO
  logic [CW-1:0] cfg_in_w, cfg_out_w;
  perm_e         out_perm;
  assign cfg_in_w = {in_valid, in_cfg, in_perm, in_tag};

  delay_line #(.WIDTH(CW), .DEPTH(N_STEP), .RESET(1'b1)) u_cfg_fifo (
    .clk, .rst_n, .din(cfg_in_w), .dout(cfg_out_w)
  );
  assign out_valid = cfg_out_w[CW-1];
  assign out_cfg   = cfg_e'(cfg_out_w[CW-2 -: 2]);
  assign out_perm  = perm_e'(cfg_out_w[CW-4 -: 2]);
  assign out_tag   = cfg_out_w[TAG_W-1:0];

  // ---------------------------------------------------------- NII carry FIFO
  logic [N_XE*$bits(nii_t)-1:0] carry_in_w, carry_out_w;
  always_comb
    for (int x = 0; x < N_XE; x++) carry_in_w[x*$bits(nii_t) +: $bits(nii_t)] = nii_carry_in[x];

  delay_line #(.WIDTH(N_XE*$bits(nii_t)), .DEPTH(N_STEP), .RESET(1'b0)) u_nii_fifo (
    .clk, .rst_n, .din(carry_in_w), .dout(carry_out_w)
  );
  always_comb
    for (int x = 0; x < N_XE; x++) nii_carry_out[x] = carry_out_w[x*$bits(nii_t) +: $bits(nii_t)];

  // ---------------------------------------------------------- X-elements
  pos_t xe_out [K_MAX];

  for (genvar x = 0; x < N_XE; x++) begin : g_xe
    chan_t   c_in  [W_XE];
    ext_t    a_in  [W_XE];
    chan_t   c_out [W_XE];
    ext_t    e_out [W_XE];
    logic    h_out [W_XE];
    sm_vec_t a_init, b_init, a_end, b_start;

    always_comb begin
      int src_a, src_b;
      for (int i = 0; i < W_XE; i++) begin
        c_in[i] = in_pos[x*W_XE + i].chan;
        a_in[i] = in_pos[x*W_XE + i].ext;
      end
      src_a = (x == xe_first(in_cfg, x)) ? xe_last(in_cfg, x) : x - 1;
      src_b = (x == xe_last(in_cfg, x))  ? xe_first(in_cfg, x) : x + 1;
      for (int s = 0; s < NSTATE; s++) begin
        a_init[s] = sm_t'(nii_use[src_a].alpha_end[s]);
        b_init[s] = sm_t'(nii_use[src_b].beta_start[s]);
      end
    end

    x_element #(.W(W_XE)) u_xe (
      .clk,
      .in_chan(c_in), .in_apri(a_in), .in_use_p2,
      .alpha_init(a_init), .beta_init(b_init),
      .out_chan(c_out), .out_ext(e_out), .out_hd(h_out),
      .alpha_end(a_end), .beta_start(b_start)
    );

    always_comb begin
      for (int i = 0; i < W_XE; i++) begin
        xe_out[x*W_XE + i].chan = c_out[i];
        xe_out[x*W_XE + i].ext  = e_out[i];
        xe_out[x*W_XE + i].hd   = h_out[i];
        out_hd_raw[x*W_XE + i]  = h_out[i];
      end
      for (int s = 0; s < NSTATE; s++) begin
        nii_own[x].alpha_end[s]  = a_end[s];
        nii_own[x].beta_start[s] = b_start[s];
      end
    end
  end

  // ---------------------------------------------------------- (de-)interleaver
  arp_interleaver u_perm (
    .perm(out_perm), .cfg(out_cfg), .din(xe_out), .dout(out_pos)
  );
endmodule
