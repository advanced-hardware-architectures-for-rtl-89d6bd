// tb_llr_unit: random test of the radix-4 LLR unit: extrinsic values (with
// the 0.75 scaling and saturation) and hard decisions of both bits against
// the reference max-Log-MAP soft output.
module tb_llr_unit;
  import tdec_pkg::*;
  import tdec_ref_pkg::*;
  logic clk = 0;
  int   checks = 0, failures = 0, cycles = 0;
  sm_vec_t  alpha, beta_next;
  gam_vec_t gamma;
  ch_t  ls0, ls1;
  ext_t la0, la1, ext0, ext1;
  logic hd0, hd1;

  llr_unit dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles == 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_sat;
    n_sat = 0;
    for (int n = 0; n < 3000; n++) begin
      vec8_t  a, b;
      vec16_t g;
      int     lp0, lp1, e0, e1, h0, h1, range;
      range = (n % 4 == 0) ? 2047 : 200;
      for (int s = 0; s < 8; s++) begin
        a[s] = (s == 0) ? 0 : int'($urandom_range(2 * range, 0)) - range;
        b[s] = (s == 0) ? 0 : int'($urandom_range(2 * range, 0)) - range;
        alpha[s] = sm_t'(a[s]);
        beta_next[s] = sm_t'(b[s]);
      end
      ls0 = ch_t'($urandom); ls1 = ch_t'($urandom);
      la0 = ext_t'($urandom_range(126, 0) - 63); la1 = ext_t'($urandom_range(126, 0) - 63);
      lp0 = int'($urandom_range(63, 0)) - 32;
      lp1 = int'($urandom_range(63, 0)) - 32;
      g = gam_vec(int'(ls0), int'(la0), int'(ls1), int'(la1), lp0, lp1);
      for (int i = 0; i < 16; i++) gamma[i] = gam_t'(g[i]);
      @(posedge clk);
      llr(a, g, b, int'(ls0) + int'(la0), int'(ls1) + int'(la1), e0, e1, h0, h1);
      if (e0 == 63 || e0 == -63) n_sat++;
      checks += 4;
      if (int'(ext0) != e0) begin failures++; if (failures < 10) $display("ext0 %0d vs %0d", ext0, e0); end
      if (int'(ext1) != e1) begin failures++; if (failures < 10) $display("ext1 %0d vs %0d", ext1, e1); end
      if (int'(hd0) != h0) begin failures++; if (failures < 10) $display("hd0 %0d vs %0d", hd0, h0); end
      if (int'(hd1) != h1) begin failures++; if (failures < 10) $display("hd1 %0d vs %0d", hd1, h1); end
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
