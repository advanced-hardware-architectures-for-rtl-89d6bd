// bmu: radix-4 branch metric unit.
//
// For one radix-4 trellis step (bits u0 then u1) it forms the 16 branch metrics
// gamma[{u0,u1,p0,p1}] = sum over the four code bits of the bit's LLR where that
// bit is 0. The systematic LLR of each bit is the channel value plus the
// a-priori (extrinsic) value; p0/p1 are the parity channel values. This is the
// max-Log-MAP branch metric up to a constant that is the same for every branch,
// which cancels in the recursions. Purely combinational.
module bmu
  import tdec_pkg::*;
(
  input  ch_t      ls0,   // systematic channel value, bit u0
  input  ext_t     la0,   // a-priori value, bit u0
  input  ch_t      ls1,
  input  ext_t     la1,
  input  ch_t      lp0,   // parity channel value of the first bit
  input  ch_t      lp1,
  output gam_vec_t gamma
);
  lsa_t s0, s1;

  always_comb begin
    s0 = lsa_t'(ls0) + lsa_t'(la0);
    s1 = lsa_t'(ls1) + lsa_t'(la1);
    for (int idx = 0; idx < 16; idx++) begin
      gamma[idx] = (idx[3] ? gam_t'(0) : gam_t'(s0))
                 + (idx[2] ? gam_t'(0) : gam_t'(s1))
                 + (idx[1] ? gam_t'(0) : gam_t'(lp0))
                 + (idx[0] ? gam_t'(0) : gam_t'(lp1));
    end
  end
endmodule
