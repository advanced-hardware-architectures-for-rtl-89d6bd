// ab_uxmap: iteration unrolled turbo decoder with an iterative afterburner.
//
// N_PIPE_HI fully pipelined half-iteration stages (default 6, decoder 1 and 2
// alternating, as in ff_uxmap but for 128-bit frames only) decode every frame.
// At the end of the pipeline the afterburner control applies the hard
// decision aided test (hard decisions of the last two half-iterations agree).
// Frames that pass leave on output 0, N_PIPE_HI * 16 cycles after entering.
// Frames that fail enter the afterburner, a looping half-iteration stage that
// holds up to AB_SLOTS = 32 frames and gives each AB_HI = 8 more half-
// iterations (6 + 8 = 14 in total); they leave on output 1,
// AB_HI * AB_SLOTS cycles later. If the afterburner has no free slot, the
// frame leaves on output 0 with out0_hda_fail set.
//
// Frames can leave out of order, so each carries a tag from input to output.
// ab_enter pulses when a frame is sent to the afterburner. N_PIPE_HI must be
// even so that the pipeline ends with decoder 2 in natural order.
module ab_uxmap
  import tdec_pkg::*;
#(
  parameter int N_PIPE_HI = 6,
  parameter int AB_HI     = 8,
  parameter int AB_SLOTS  = 32,
  parameter int TAG_W     = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [TAG_W-1:0] in_tag,
  input  chan_t            in_chan [K_MAX],
  output logic             out0_valid,
  output logic [TAG_W-1:0] out0_tag,
  output logic             out0_hd [K_MAX],
  output logic             out0_hda_fail,
  output logic             out1_valid,
  output logic [TAG_W-1:0] out1_tag,
  output logic             out1_hd [K_MAX],
  output logic             ab_enter
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

  for (genvar h = 0; h < N_PIPE_HI; h++) begin : g_hi
    localparam perm_e PERM = (h % 2 == 0) ? PERM_PI : PERM_PI_INV;
    logic             o_valid;
    cfg_e             o_cfg;
    logic [TAG_W-1:0] o_tag;
    pos_t             o_pos    [K_MAX];
    logic             o_hd_raw [K_MAX];
    nii_t             o_own    [N_XE];
    nii_t             o_fwd    [N_XE];
    logic             i_valid;
    logic [TAG_W-1:0] i_tag;
    pos_t             i_pos    [K_MAX];
    nii_t             i_use    [N_XE];
    nii_t             i_carry  [N_XE];

    if (h == 0) begin : g_in
      assign i_valid = in_valid;
      assign i_tag   = in_tag;
      assign i_pos   = p_in;
      assign i_use   = zero;
      assign i_carry = zero;
    end else begin : g_chain
      assign i_valid = g_hi[h-1].o_valid;
      assign i_tag   = g_hi[h-1].o_tag;
      assign i_pos   = g_hi[h-1].o_pos;
      assign i_carry = g_hi[h-1].o_own;
      if (h < 2) begin : g_first_it
        assign i_use = zero;
      end else begin : g_nii
        assign i_use = g_hi[h-1].o_fwd;
      end
    end

    hi_stage #(.TAG_W(TAG_W)) u_stage (
      .clk, .rst_n,
      .in_valid(i_valid), .in_cfg(CFG_128), .in_use_p2(h % 2 == 1), .in_perm(PERM), .in_tag(i_tag),
      .in_pos(i_pos), .nii_use(i_use), .nii_carry_in(i_carry),
      .out_valid(o_valid), .out_cfg(o_cfg), .out_tag(o_tag),
      .out_pos(o_pos), .out_hd_raw(o_hd_raw),
      .nii_own(o_own), .nii_carry_out(o_fwd)
    );
  end

  localparam int L = N_PIPE_HI - 1;

  logic prev_hd [K_MAX];
  logic last_hd [K_MAX];
  logic ab_free;

  always_comb
    for (int i = 0; i < K_MAX; i++) begin
      prev_hd[i] = g_hi[L-1].o_pos[i].hd;
      last_hd[i] = g_hi[L].o_pos[i].hd;
    end

  ab_control #(.TAG_W(TAG_W), .LAT(N_STEP)) u_ctrl (
    .clk, .rst_n,
    .prev_hd,
    .last_valid(g_hi[L].o_valid), .last_tag(g_hi[L].o_tag),
    .last_hd_raw(g_hi[L].o_hd_raw), .last_hd,
    .ab_free, .ab_enter,
    .out0_valid, .out0_tag, .out0_hd, .out0_hda_fail
  );

  afterburner #(.AB_HI(AB_HI), .AB_SLOTS(AB_SLOTS), .TAG_W(TAG_W)) u_ab (
    .clk, .rst_n,
    .enter(ab_enter), .enter_tag(g_hi[L].o_tag), .enter_pos(g_hi[L].o_pos),
    .enter_nii_same(g_hi[L].o_fwd), .enter_nii_other(g_hi[L].o_own),
    .entry_free(ab_free),
    .out_valid(out1_valid), .out_tag(out1_tag), .out_hd(out1_hd)
  );

  initial assert (N_PIPE_HI % 2 == 0 && N_PIPE_HI >= 2) else $error("ab_uxmap: N_PIPE_HI must be even");
endmodule
