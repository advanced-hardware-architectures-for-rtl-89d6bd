// fru: radix-4 forward recursion unit (add-compare-select over 8 states).
//
// alpha_next[s'] = max over the four radix-4 branches (s, u0u1) that end in s'
// of alpha[s] + gamma[{u0,u1,p0,p1}]. The result is normalised by subtracting
// the new metric of state 0 and saturated to SM_W bits, so state 0 always holds
// 0. The trellis is the 8-state code of tdec_pkg. Purely combinational.
module fru
  import tdec_pkg::*;
(
  input  sm_vec_t  alpha,
  input  gam_vec_t gamma,
  output sm_vec_t  alpha_next
);
  met_t best [NSTATE];

  always_comb begin
    for (int t = 0; t < NSTATE; t++) best[t] = {1'b1, {(MET_W-1){1'b0}}};
    for (int s = 0; s < NSTATE; s++) begin
      for (int u = 0; u < 4; u++) begin
        logic [2:0] ns;
        logic [1:0] p;
        met_t cand;
        ns   = r4_next(3'(s), 2'(u));
        p    = r4_par(3'(s), 2'(u));
        cand = met_t'(alpha[s]) + met_t'(gamma[{2'(u), p}]);
        if (cand > best[ns]) best[ns] = cand;
      end
    end
    for (int t = 0; t < NSTATE; t++)
      alpha_next[t] = sat_sm((MET_W+1)'(best[t]) - (MET_W+1)'(best[0]));
  end
endmodule
