// turbo_decoder_top: the two iteration unrolled turbo decoders side by side.
//
// ff_* is the frame flexible decoder (8 pipelined half-iterations, frame
// sizes 128, 64 and 32 bits in four slot configurations); ab_* is the decoder
// with 6 pipelined half-iterations and an iterative afterburner for frames
// that fail the hard decision aided test (128-bit frames). Both take one
// 128-bit frame slot per cycle; see ff_uxmap and ab_uxmap for timing. They
// share only clock and reset.
module turbo_decoder_top
  import tdec_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // frame flexible decoder
  input  logic        ff_in_valid,
  input  cfg_e        ff_in_cfg,
  input  chan_t       ff_in_chan [K_MAX],
  output logic        ff_out_valid,
  output cfg_e        ff_out_cfg,
  output logic        ff_out_hd  [K_MAX],
  // decoder with afterburner
  input  logic        ab_in_valid,
  input  logic [7:0]  ab_in_tag,
  input  chan_t       ab_in_chan [K_MAX],
  output logic        ab_out0_valid,
  output logic [7:0]  ab_out0_tag,
  output logic        ab_out0_hd [K_MAX],
  output logic        ab_out0_hda_fail,
  output logic        ab_out1_valid,
  output logic [7:0]  ab_out1_tag,
  output logic        ab_out1_hd [K_MAX],
  output logic        ab_enter
);
  ff_uxmap u_ff (
    .clk, .rst_n,
    .in_valid(ff_in_valid), .in_cfg(ff_in_cfg), .in_chan(ff_in_chan),
    .out_valid(ff_out_valid), .out_cfg(ff_out_cfg), .out_hd(ff_out_hd)
  );

  ab_uxmap u_ab (
    .clk, .rst_n,
    .in_valid(ab_in_valid), .in_tag(ab_in_tag), .in_chan(ab_in_chan),
    .out0_valid(ab_out0_valid), .out0_tag(ab_out0_tag), .out0_hd(ab_out0_hd),
    .out0_hda_fail(ab_out0_hda_fail),
    .out1_valid(ab_out1_valid), .out1_tag(ab_out1_tag), .out1_hd(ab_out1_hd),
    .ab_enter
  );
endmodule
