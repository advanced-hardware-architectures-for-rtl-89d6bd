// ab_control: afterburner control with the hard decision aided (HDA) stopping test.
//
// Every frame leaving the last pipelined half-iteration stage is tested: its
// hard decisions must equal those of the half-iteration before. The earlier
// decisions (prev_hd, taken at the input of the last stage, in the same
// interleaved order as last_hd_raw) are delayed by the stage latency LAT so
// that both belong to the same frame. A frame that passes leaves on output 0.
// A frame that fails is sent into the afterburner (ab_enter) when the
// afterburner has a free slot this cycle (ab_free); when it has none the
// frame leaves on output 0 as it is, flagged by out0_hda_fail (afterburner
// overflow). Combinational apart from the delay line.
module ab_control
  import tdec_pkg::*;
#(
  parameter int TAG_W = 8,
  parameter int LAT   = N_STEP
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             prev_hd     [K_MAX],
  input  logic             last_valid,
  input  logic [TAG_W-1:0] last_tag,
  input  logic             last_hd_raw [K_MAX],
  input  logic             last_hd     [K_MAX],
  input  logic             ab_free,
  output logic             ab_enter,
  output logic             out0_valid,
  output logic [TAG_W-1:0] out0_tag,
  output logic             out0_hd     [K_MAX],
  output logic             out0_hda_fail
);
  logic [K_MAX-1:0] prev_w, prev_d, last_w;
  logic             hda_ok;

  always_comb
    for (int i = 0; i < K_MAX; i++) begin
      prev_w[i] = prev_hd[i];
      last_w[i] = last_hd_raw[i];
    end

  delay_line #(.WIDTH(K_MAX), .DEPTH(LAT), .RESET(1'b0)) u_hd_delay (
    .clk, .rst_n, .din(prev_w), .dout(prev_d)
  );

  assign hda_ok        = (prev_d == last_w);
  assign ab_enter      = last_valid && !hda_ok && ab_free;
  assign out0_valid    = last_valid && !ab_enter;
  assign out0_hda_fail = last_valid && !hda_ok && !ab_free;
  assign out0_tag      = last_tag;
  assign out0_hd       = last_hd;
endmodule
