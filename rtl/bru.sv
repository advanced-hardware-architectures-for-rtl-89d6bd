// bru: radix-4 backward recursion unit (add-compare-select over 8 states).
//
// beta[s] = max over the four radix-4 branches leaving s of
// gamma[{u0,u1,p0,p1}] + beta_next[s'], where beta_next holds the metrics after
// the step. Normalised by subtracting the metric of state 0 and saturated to
// SM_W bits. Purely combinational.
module bru
  import tdec_pkg::*;
(
  input  sm_vec_t  beta_next,
  input  gam_vec_t gamma,
  output sm_vec_t  beta
);
  met_t best [NSTATE];

  always_comb begin
    for (int s = 0; s < NSTATE; s++) begin
      best[s] = {1'b1, {(MET_W-1){1'b0}}};
      for (int u = 0; u < 4; u++) begin
        logic [2:0] ns;
        logic [1:0] p;
        met_t cand;
        ns   = r4_next(3'(s), 2'(u));
        p    = r4_par(3'(s), 2'(u));
        cand = met_t'(beta_next[ns]) + met_t'(gamma[{2'(u), p}]);
        if (cand > best[s]) best[s] = cand;
      end
    end
    for (int s = 0; s < NSTATE; s++)
      beta[s] = sat_sm((MET_W+1)'(best[s]) - (MET_W+1)'(best[0]));
  end
endmodule
