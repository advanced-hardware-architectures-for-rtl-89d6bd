// tb_bru: random test of the radix-4 backward recursion unit against the
// reference add-compare-select with state-0 normalisation and saturation.
// Includes input metrics near the saturation limits.
module tb_bru;
  import tdec_pkg::*;
  import tdec_ref_pkg::*;
  logic clk = 0;
  int   checks = 0, failures = 0, cycles = 0;
  sm_vec_t  beta_next, beta;
  gam_vec_t gamma;

  bru dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles == 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      vec8_t  m, r;
      vec16_t g;
      int     range;
      range = (n % 3 == 0) ? 2047 : 400;
      for (int s = 0; s < 8; s++) begin
        m[s] = (s == 0) ? 0 : int'($urandom_range(2 * range, 0)) - range;
        beta_next[s] = sm_t'(m[s]);
      end
      g = gam_vec(int'($urandom_range(63, 0)) - 32, int'($urandom_range(126, 0)) - 63,
                  int'($urandom_range(63, 0)) - 32, int'($urandom_range(126, 0)) - 63,
                  int'($urandom_range(63, 0)) - 32, int'($urandom_range(63, 0)) - 32);
      for (int i = 0; i < 16; i++) gamma[i] = gam_t'(g[i]);
      @(posedge clk);
      r = bwd(m, g);
      for (int s = 0; s < 8; s++) begin
        checks++;
        if (int'(beta[s]) != r[s]) begin
          failures++;
          if (failures < 10) $display("bru mismatch state %0d: %0d vs %0d", s, beta[s], r[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
