// tb_ab_uxmap: end-to-end test of the decoder with afterburner at its
// default size (6 pipelined half-iterations, 32-slot afterburner, 8 extra
// half-iterations).
//
// Sends encoded frames with light noise (expected to pass the HDA test after
// the pipeline), frames with heavy noise, and a burst of 40 frames of random
// channel values (expected to fail it and to overflow the afterburner).
// Every tag must come out exactly once. A frame on output 0 must come 96
// cycles after its input, carry the reference hard decisions after 6
// half-iterations, and be flagged as failed exactly when the reference HDA
// test fails; a frame on output 1 must have failed the reference HDA test,
// leave 96 + 256 cycles after input, and carry the reference decisions after
// 14 half-iterations. Converged, afterburner and overflow cases are counted
// and each must occur.
module tb_ab_uxmap;
  import tdec_pkg::*;
  import tdec_ref_pkg::*;
  localparam int N_PIPE_HI = 6, AB_HI = 8, AB_SLOTS = 32;
  localparam int LAT0 = N_PIPE_HI * N_STEP;
  localparam int LAT1 = LAT0 + AB_HI * AB_SLOTS;
  localparam int NF   = 90;
  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0, cycles = 0;

  logic       in_valid, out0_valid, out0_hda_fail, out1_valid, ab_enter;
  logic [7:0] in_tag, out0_tag, out1_tag;
  chan_t      in_chan [K_MAX];
  logic       out0_hd [K_MAX], out1_hd [K_MAX];

  ab_uxmap dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles == 4000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  slot_t e6 [NF], e14 [NF];
  int    conv [NF], seen [NF], t_in [NF], data [NF][RK], kind [NF];
  int    n_conv = 0, n_ab = 0, n_over = 0, n_enter = 0, ok_ab = 0;

  always @(negedge clk) if (rst_n) begin
    if (ab_enter) n_enter++;
    if (out0_valid) begin
      int f;
      f = int'(out0_tag);
      checks += 3;
      seen[f]++;
      if (cycles - t_in[f] != LAT0) begin failures++; $display("frame %0d: output 0 after %0d cycles", f, cycles - t_in[f]); end
      if (out0_hda_fail != !conv[f]) begin failures++; $display("frame %0d: HDA flag %0d, reference converged %0d", f, out0_hda_fail, conv[f]); end
      for (int i = 0; i < K_MAX; i++) if (int'(out0_hd[i]) != e6[f].hd[i]) begin failures++; break; end
      if (out0_hda_fail) n_over++; else n_conv++;
    end
    if (out1_valid) begin
      int f, errs;
      f = int'(out1_tag);
      checks += 3;
      seen[f]++;
      if (cycles - t_in[f] != LAT1) begin failures++; $display("frame %0d: output 1 after %0d cycles", f, cycles - t_in[f]); end
      if (conv[f]) begin failures++; $display("frame %0d converged but went to the afterburner", f); end
      errs = 0;
      for (int i = 0; i < K_MAX; i++) begin
        if (int'(out1_hd[i]) != e14[f].hd[i]) begin failures++; $display("frame %0d bit %0d differs from reference", f, i); break; end
      end
      for (int i = 0; i < K_MAX; i++) errs += (int'(out1_hd[i]) != data[f][i]);
      if (kind[f] != 2 && errs == 0) ok_ab++;
      n_ab++;
    end
  end

  initial begin
    in_valid = 0;
    in_tag = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NF; n++) begin
      slot_t s, s5, raw6;
      int p1 [RK], p2 [RK];
      kind[n] = (n < 30) ? n % 2 : 2;   // 0 light noise, 1 heavy noise, 2 random values
      for (int i = 0; i < RK; i++) data[n][i] = int'($urandom_range(1, 0));
      turbo_encode(data[n], 0, RK, p1, p2);
      for (int i = 0; i < RK; i++) begin
        if (kind[n] == 2) begin
          s.sys[i] = int'($urandom_range(62, 0)) - 31;
          s.p1[i]  = int'($urandom_range(62, 0)) - 31;
          s.p2[i]  = int'($urandom_range(62, 0)) - 31;
        end else begin
          s.sys[i] = chan_llr(data[n][i], kind[n] ? 3 : 7, kind[n] ? 7 : 3);
          s.p1[i]  = chan_llr(p1[i], kind[n] ? 3 : 7, kind[n] ? 7 : 3);
          s.p2[i]  = chan_llr(p2[i], kind[n] ? 3 : 7, kind[n] ? 7 : 3);
        end
        s.ext[i] = 0;
        s.hd[i]  = 0;
        in_chan[i].sys = ch_t'(s.sys[i]);
        in_chan[i].p1  = ch_t'(s.p1[i]);
        in_chan[i].p2  = ch_t'(s.p2[i]);
      end
      s5      = permute(decode(s, 0, N_PIPE_HI - 1), 0, 1);
      e6[n]   = decode(s, 0, N_PIPE_HI);
      e14[n]  = decode(s, 0, N_PIPE_HI + AB_HI);
      raw6    = permute(e6[n], 0, 1);
      conv[n] = (s5.hd == raw6.hd);
      seen[n] = 0;
      in_valid = 1;
      in_tag   = 8'(n);
      t_in[n]  = cycles;
      @(negedge clk);
      if (n < 30 && n % 5 == 4) begin in_valid = 0; @(negedge clk); end
    end
    in_valid = 0;
    repeat (LAT1 + 10) @(negedge clk);
    for (int n = 0; n < NF; n++) begin
      checks++;
      if (seen[n] != 1) begin failures++; $display("frame %0d came out %0d times", n, seen[n]); end
    end
    checks += 3;
    if (n_conv == 0) begin failures++; $display("no frame passed the HDA test"); end
    if (n_ab == 0 || n_enter != n_ab) begin failures++; $display("afterburner: %0d entered, %0d left", n_enter, n_ab); end
    if (n_over == 0) begin failures++; $display("afterburner never overflowed"); end
    $display("output 0: %0d passed HDA, %0d overflow; output 1: %0d frames (%0d noisy codewords corrected)",
             n_conv, n_over, n_ab, ok_ab);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
