// tb_x_element: streams a new random sub-block into the X-element every
// cycle and checks, N = 16 cycles later, every extrinsic value, hard
// decision, border state metric and passed-through channel value against the
// reference max-Log-MAP of the whole sub-block. The exact latency follows
// from the check being made at that cycle.
module tb_x_element;
  import tdec_pkg::*;
  import tdec_ref_pkg::*;
  localparam int NF = 60;
  localparam int N  = W_XE / 2;
  logic clk = 0;
  int   checks = 0, failures = 0, cycles = 0;

  chan_t   in_chan [W_XE];
  ext_t    in_apri [W_XE];
  logic    in_use_p2;
  sm_vec_t alpha_init, beta_init;
  chan_t   out_chan [W_XE];
  ext_t    out_ext  [W_XE];
  logic    out_hd   [W_XE];
  sm_vec_t alpha_end, beta_start;

  x_element #(.W(W_XE)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles == 10000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int    e_ext [NF][RW];
  int    e_hd  [NF][RW];
  vec8_t e_ae  [NF];
  vec8_t e_bs  [NF];
  chan_t e_ch  [NF][RW];

  task automatic check(input int f);
    for (int i = 0; i < RW; i++) begin
      checks += 3;
      if (int'(out_ext[i]) != e_ext[f][i]) begin
        failures++;
        if (failures < 10) $display("frame %0d ext[%0d] %0d vs %0d", f, i, out_ext[i], e_ext[f][i]);
      end
      if (int'(out_hd[i]) != e_hd[f][i]) failures++;
      if (out_chan[i] != e_ch[f][i]) failures++;
    end
    for (int s = 0; s < 8; s++) begin
      checks += 2;
      if (int'(alpha_end[s]) != e_ae[f][s]) begin
        failures++;
        if (failures < 10) $display("frame %0d alpha_end[%0d] %0d vs %0d", f, s, alpha_end[s], e_ae[f][s]);
      end
      if (int'(beta_start[s]) != e_bs[f][s]) failures++;
    end
  endtask

  initial begin
    for (int n = 0; n < NF + N; n++) begin
      @(negedge clk);
      if (n >= N) check(n - N);
      if (n < NF) begin
        int ls [RW], la [RW], lp [RW];
        vec8_t a0, bn;
        int range;
        range = (n % 5 == 0) ? 2047 : 300;
        in_use_p2 = 1'($urandom);
        for (int i = 0; i < RW; i++) begin
          in_chan[i].sys = ch_t'($urandom);
          in_chan[i].p1  = ch_t'($urandom);
          in_chan[i].p2  = ch_t'($urandom);
          in_apri[i]     = ext_t'($urandom_range(126, 0) - 63);
          ls[i] = int'(in_chan[i].sys);
          la[i] = int'(in_apri[i]);
          lp[i] = in_use_p2 ? int'(in_chan[i].p2) : int'(in_chan[i].p1);
          e_ch[n][i] = in_chan[i];
        end
        for (int s = 0; s < 8; s++) begin
          a0[s] = (s == 0 || n % 7 == 0) ? 0 : int'($urandom_range(2 * range, 0)) - range;
          bn[s] = (s == 0 || n % 7 == 0) ? 0 : int'($urandom_range(2 * range, 0)) - range;
          alpha_init[s] = sm_t'(a0[s]);
          beta_init[s]  = sm_t'(bn[s]);
        end
        subblock(ls, la, lp, a0, bn, e_ext[n], e_hd[n], e_ae[n], e_bs[n]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
