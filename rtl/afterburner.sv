// afterburner: iterative half-iteration stage that decodes frames the pipeline
// could not finish.
//
// One half-iteration stage (four X-elements) is closed into a loop with a
// delay line, so that the loop holds AB_SLOTS frame slots (default 32) and
// each slot comes back to the loop head every AB_SLOTS cycles. At the loop
// head a slot that has had AB_HI passes (default 8) leaves on the output and
// frees its place; a free place takes a new frame offered on enter (enter
// must only be raised while entry_free is high). Every other occupied slot
// goes round again. Pass n acts as component decoder 1 with the interleaver
// at its output when n is even, and as decoder 2 with the de-interleaver when
// n is odd, so a frame enters and leaves in natural order; the frame entering
// must have just finished a decoder-2 half-iteration.
//
// Each slot carries its channel values, extrinsic values and hard decisions,
// its tag and pass count, and the border state metrics of its last two passes
// for next iteration initialisation (nii_same: last pass of the decoder about
// to run, nii_other: last pass of the other decoder). A frame leaves
// AB_HI * AB_SLOTS cycles after it entered. Frame size 128 only.
module afterburner
  import tdec_pkg::*;
#(
  parameter int AB_HI    = 8,
  parameter int AB_SLOTS = 32,
  parameter int TAG_W    = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enter,
  input  logic [TAG_W-1:0] enter_tag,
  input  pos_t             enter_pos       [K_MAX],
  input  nii_t             enter_nii_same  [N_XE],
  input  nii_t             enter_nii_other [N_XE],
  output logic             entry_free,
  output logic             out_valid,
  output logic [TAG_W-1:0] out_tag,
  output logic             out_hd          [K_MAX]
);
  localparam int CNT_W = $clog2(AB_HI + 1);
  localparam int PW    = K_MAX * $bits(pos_t) + 2 * N_XE * $bits(nii_t) + TAG_W + CNT_W;

  // loop head
  logic             head_valid;
  logic [CNT_W-1:0] head_cnt;
  logic [TAG_W-1:0] head_tag;
  pos_t             head_pos   [K_MAX];
  nii_t             head_same  [N_XE];
  nii_t             head_other [N_XE];
  logic             finishing, take_new;

  // stage input
  logic             s_valid;
  logic [CNT_W-1:0] s_cnt;
  logic [TAG_W-1:0] s_tag;
  pos_t             s_pos   [K_MAX];
  nii_t             s_same  [N_XE];
  nii_t             s_other [N_XE];

  // stage output
  logic                   o_valid;
  cfg_e                   o_cfg;
  logic [TAG_W+CNT_W-1:0] o_tagcnt;
  pos_t                   o_pos   [K_MAX];
  logic                   o_hd_raw [K_MAX];
  nii_t                   o_own   [N_XE];
  nii_t                   o_fwd   [N_XE];

  logic [PW-1:0] loop_in, loop_out;

  assign finishing  = head_valid && (head_cnt == CNT_W'(AB_HI));
  assign entry_free = !head_valid || finishing;
  assign take_new   = enter && entry_free;

  assign out_valid = finishing;
  assign out_tag   = head_tag;
  always_comb
    for (int i = 0; i < K_MAX; i++) out_hd[i] = head_pos[i].hd;

  always_comb begin
    s_valid = take_new || (head_valid && !finishing);
    s_cnt   = take_new ? '0 : head_cnt;
    s_tag   = take_new ? enter_tag : head_tag;
    s_pos   = take_new ? enter_pos : head_pos;
    s_same  = take_new ? enter_nii_same : head_same;
    s_other = take_new ? enter_nii_other : head_other;
  end

  hi_stage #(.TAG_W(TAG_W + CNT_W)) u_stage (
    .clk, .rst_n,
    .in_valid(s_valid), .in_cfg(CFG_128), .in_use_p2(s_cnt[0]),
    .in_perm(s_cnt[0] ? PERM_PI_INV : PERM_PI), .in_tag({s_tag, s_cnt}),
    .in_pos(s_pos), .nii_use(s_same), .nii_carry_in(s_other),
    .out_valid(o_valid), .out_cfg(o_cfg), .out_tag(o_tagcnt),
    .out_pos(o_pos), .out_hd_raw(o_hd_raw),
    .nii_own(o_own), .nii_carry_out(o_fwd)
  );

  // pack the slot for the loop delay line: the metrics of the decoder that
  // runs next are those of the pass before this one (o_fwd)
  always_comb begin
    int k;
    k = 0;
    for (int i = 0; i < K_MAX; i++) begin
      loop_in[k +: $bits(pos_t)] = o_pos[i];
      k += $bits(pos_t);
    end
    for (int x = 0; x < N_XE; x++) begin
      loop_in[k +: $bits(nii_t)] = o_fwd[x];
      k += $bits(nii_t);
      loop_in[k +: $bits(nii_t)] = o_own[x];
      k += $bits(nii_t);
    end
    loop_in[k +: TAG_W] = o_tagcnt[CNT_W +: TAG_W];
    k += TAG_W;
    loop_in[k +: CNT_W] = o_tagcnt[CNT_W-1:0] + 1'b1;
  end

  delay_line #(.WIDTH(PW), .DEPTH(AB_SLOTS - N_STEP), .RESET(1'b0)) u_loop (
    .clk, .rst_n, .din(loop_in), .dout(loop_out)
  );
  delay_line #(.WIDTH(1), .DEPTH(AB_SLOTS - N_STEP), .RESET(1'b1)) u_loop_valid (
    .clk, .rst_n, .din(o_valid), .dout(head_valid)
  );

  always_comb begin
    int k;
    k = 0;
    for (int i = 0; i < K_MAX; i++) begin
      head_pos[i] = loop_out[k +: $bits(pos_t)];
      k += $bits(pos_t);
    end
    for (int x = 0; x < N_XE; x++) begin
      head_same[x] = loop_out[k +: $bits(nii_t)];
      k += $bits(nii_t);
      head_other[x] = loop_out[k +: $bits(nii_t)];
      k += $bits(nii_t);
    end
    head_tag = loop_out[k +: TAG_W];
    k += TAG_W;
    head_cnt = loop_out[k +: CNT_W];
  end

  initial assert (AB_SLOTS >= N_STEP) else $error("afterburner: AB_SLOTS below stage latency");

  a_enter_free: assert property (@(posedge clk) disable iff (!rst_n) enter |-> entry_free)
    else $error("afterburner: enter while no free slot");
endmodule
