// ff_uxmap: frame flexible, fully pipelined, iteration unrolled turbo decoder.
//
// The iterative loop of a turbo decoder is unrolled onto N_HI half-iteration
// stages (default 8, i.e. 4 full iterations). Even stages act as component
// decoder 1 (parity 1, natural order) and end with the interleaver PI; odd
// stages act as component decoder 2 (parity 2, interleaved order) and end with
// the de-interleaver. A new 128-bit frame slot can enter every clock cycle, so
// at 800 MHz the decoder delivers 128 bits per cycle, 102.4 Gb/s, whatever the
// configuration.
//
// in_cfg selects how the slot is used: one 128-bit frame, two 64-bit frames,
// four 32-bit frames or one 64-bit and two 32-bit frames (packed from position
// 0). The configuration travels with the slot through each stage's
// configuration FIFO and steers that stage's NII wrap-around and its
// (de-)interleaver multiplexers.
//
// Channel inputs are 6-bit LLRs (positive favours 0). out_hd are the hard
// decisions of the last half-iteration in natural order, out_valid and out_cfg
// come N_HI * 16 cycles after the slot entered. The first iteration (stages 0
// and 1) starts from all-zero border metrics.
module ff_uxmap
  import tdec_pkg::*;
#(
  parameter int N_HI = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cfg_e  in_cfg,
  input  chan_t in_chan [K_MAX],
  output logic  out_valid,
  output cfg_e  out_cfg,
  output logic  out_hd  [K_MAX]
);
  pos_t p_in [K_MAX];
  nii_t zero [N_XE];

  always_comb begin
    for (int i = 0; i < K_MAX; i++) begin
      p_in[i].chan = in_chan[i];
      p_in[i].ext  = '0;
      p_in[i].hd   = 1'b0;
    end
    for (int x = 0; x < N_XE; x++) zero[x] = '0;
  end

  for (genvar h = 0; h < N_HI; h++) begin : g_hi
    localparam perm_e PERM = (h % 2 == 0) ? ((h == N_HI - 1) ? PERM_NONE : PERM_PI) : PERM_PI_INV;
    // stage outputs
    logic o_valid;
    cfg_e o_cfg;
    pos_t o_pos [K_MAX];
    nii_t o_own [N_XE];   // border metrics of this stage
    nii_t o_fwd [N_XE];   // border metrics of the stage before, delayed
    logic o_tag;
    logic unused_hd [K_MAX];
    // stage inputs
    logic i_valid;
    cfg_e i_cfg;
    pos_t i_pos [K_MAX];
    nii_t i_use [N_XE];
    nii_t i_carry [N_XE];

    if (h == 0) begin : g_in
      assign i_valid = in_valid;
      assign i_cfg   = in_cfg;
      assign i_pos   = p_in;
      assign i_use   = zero;
      assign i_carry = zero;
    end else begin : g_chain
      assign i_valid = g_hi[h-1].o_valid;
      assign i_cfg   = g_hi[h-1].o_cfg;
      assign i_pos   = g_hi[h-1].o_pos;
      assign i_carry = g_hi[h-1].o_own;
      if (h < 2) begin : g_first_it
        assign i_use = zero;
      end else begin : g_nii
        assign i_use = g_hi[h-1].o_fwd;
      end
    end

    hi_stage #(.TAG_W(1)) u_stage (
      .clk, .rst_n,
      .in_valid(i_valid), .in_cfg(i_cfg), .in_use_p2(h % 2 == 1), .in_perm(PERM), .in_tag(1'b0),
      .in_pos(i_pos), .nii_use(i_use), .nii_carry_in(i_carry),
      .out_valid(o_valid), .out_cfg(o_cfg), .out_tag(o_tag),
      .out_pos(o_pos), .out_hd_raw(unused_hd),
      .nii_own(o_own), .nii_carry_out(o_fwd)
    );
  end

  assign out_valid = g_hi[N_HI-1].o_valid;
  assign out_cfg   = g_hi[N_HI-1].o_cfg;
  always_comb
    for (int i = 0; i < K_MAX; i++) out_hd[i] = g_hi[N_HI-1].o_pos[i].hd;
endmodule
