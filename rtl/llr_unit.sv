// llr_unit: radix-4 soft output unit.
//
// For every radix-4 branch (s, u0u1 -> s') it forms alpha[s] + gamma + beta[s'],
// takes the maximum over branches with u0 = 0 and u0 = 1 (and likewise for u1)
// and subtracts them: that is the a-posteriori LLR of each bit. The hard
// decision is its sign (1 when negative). The extrinsic output is the
// a-posteriori LLR minus the bit's systematic + a-priori value, scaled by the
// extrinsic scaling factor 0.75 (floor of 3x/4) and saturated to +-63.
// Purely combinational.
module llr_unit
  import tdec_pkg::*;
(
  input  sm_vec_t  alpha,      // forward metrics before the step
  input  gam_vec_t gamma,
  input  sm_vec_t  beta_next,  // backward metrics after the step
  input  ch_t      ls0,
  input  ext_t     la0,
  input  ch_t      ls1,
  input  ext_t     la1,
  output ext_t     ext0,
  output ext_t     ext1,
  output logic     hd0,
  output logic     hd1
);
  met_t m0_0, m0_1, m1_0, m1_1;   // m<bit>_<value>
  logic signed [MET_W:0]   app0, app1;
  logic signed [MET_W+2:0] e0, e1;

  always_comb begin
    m0_0 = {1'b1, {(MET_W-1){1'b0}}};
    m0_1 = m0_0;
    m1_0 = m0_0;
    m1_1 = m0_0;
    for (int s = 0; s < NSTATE; s++) begin
      for (int u = 0; u < 4; u++) begin
        logic [2:0] ns;
        logic [1:0] p;
        met_t m;
        ns = r4_next(3'(s), 2'(u));
        p  = r4_par(3'(s), 2'(u));
        m  = met_t'(alpha[s]) + met_t'(gamma[{2'(u), p}]) + met_t'(beta_next[ns]);
        if (u[1]) begin if (m > m0_1) m0_1 = m; end
        else      begin if (m > m0_0) m0_0 = m; end
        if (u[0]) begin if (m > m1_1) m1_1 = m; end
        else      begin if (m > m1_0) m1_0 = m; end
      end
    end
    app0 = (MET_W+1)'(m0_0) - (MET_W+1)'(m0_1);
    app1 = (MET_W+1)'(m1_0) - (MET_W+1)'(m1_1);
    e0   = (MET_W+3)'(app0) - (MET_W+3)'(ls0) - (MET_W+3)'(la0);
    e1   = (MET_W+3)'(app1) - (MET_W+3)'(ls1) - (MET_W+3)'(la1);
    ext0 = esf_scale(e0);
    ext1 = esf_scale(e1);
    hd0  = app0 < 0;
    hd1  = app1 < 0;
  end
endmodule
