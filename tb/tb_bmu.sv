// tb_bmu: random test of the radix-4 branch metric unit against the
// reference sum-of-zero-bit-LLRs metric, including the extreme input values.
module tb_bmu;
  import tdec_pkg::*;
  import tdec_ref_pkg::*;
  logic clk = 0;
  int   checks = 0, failures = 0, cycles = 0;
  ch_t  ls0, ls1, lp0, lp1;
  ext_t la0, la1;
  gam_vec_t gamma;

  bmu dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles == 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      vec16_t g;
      if (n < 2) begin
        ls0 = n ? -32 : 31; ls1 = ls0; lp0 = ls0; lp1 = ls0;
        la0 = n ? -63 : 63; la1 = la0;
      end else begin
        ls0 = ch_t'($urandom); ls1 = ch_t'($urandom);
        lp0 = ch_t'($urandom); lp1 = ch_t'($urandom);
        la0 = ext_t'($urandom_range(126, 0) - 63); la1 = ext_t'($urandom_range(126, 0) - 63);
      end
      @(posedge clk);
      g = gam_vec(int'(ls0), int'(la0), int'(ls1), int'(la1), int'(lp0), int'(lp1));
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (int'(gamma[i]) != g[i]) begin
          failures++;
          if (failures < 10) $display("bmu mismatch idx %0d: %0d vs %0d", i, gamma[i], g[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
