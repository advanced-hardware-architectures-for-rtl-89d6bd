// tb_turbo_decoder_top: end-to-end test of both decoders in the top level at
// their default sizes.
//
// Frame flexible decoder: 12 slots, three in each slot configuration
// (128, 64+64, 4x32, 64+32+32), each checked bit for bit against the
// reference model after 8 half-iterations and against the sent data, with a
// latency of 128 cycles. Afterburner decoder: 8 lightly disturbed frames
// followed by a burst of 40 frames of random channel values, so that frames
// pass the HDA test, enter the afterburner and overflow it. Routing, latency
// (96 and 96 + 256 cycles) and hard decisions are checked against the
// reference model. Each mechanism (four configurations, HDA pass, afterburner,
// overflow) is counted and must occur.
module tb_turbo_decoder_top;
  import tdec_pkg::*;
  import tdec_ref_pkg::*;
  localparam int NS = 12, NA = 48;
  localparam int LATF = 8 * N_STEP, LAT0 = 6 * N_STEP, LAT1 = LAT0 + 8 * 32;
  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0, cycles = 0;

  logic       ff_in_valid, ff_out_valid;
  cfg_e       ff_in_cfg, ff_out_cfg;
  chan_t      ff_in_chan [K_MAX], ab_in_chan [K_MAX];
  logic       ff_out_hd [K_MAX], ab_out0_hd [K_MAX], ab_out1_hd [K_MAX];
  logic       ab_in_valid, ab_out0_valid, ab_out0_hda_fail, ab_out1_valid, ab_enter;
  logic [7:0] ab_in_tag, ab_out0_tag, ab_out1_tag;

  turbo_decoder_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles == 3000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------ frame flexible decoder
  slot_t ef [NS];
  int    fdata [NS][RK], tf [NS], nf_out = 0, cfg_out [4], ff_ok = 0;

  always @(negedge clk) if (rst_n && ff_out_valid) begin
    int f;
    f = nf_out++;
    checks += 2;
    if (cycles - tf[f] != LATF) begin failures++; $display("slot %0d latency %0d", f, cycles - tf[f]); end
    if (int'(ff_out_cfg) != f % 4) failures++;
    cfg_out[f % 4]++;
    for (int i = 0; i < K_MAX; i++) begin
      checks++;
      if (int'(ff_out_hd[i]) != ef[f].hd[i]) failures++;
      if (int'(ff_out_hd[i]) != fdata[f][i]) begin failures++; $display("slot %0d bit %0d not decoded", f, i); end
    end
    ff_ok++;
  end

  initial begin
    ff_in_valid = 0;
    ff_in_cfg = CFG_128;
    wait (rst_n);
    @(negedge clk);
    for (int n = 0; n < NS; n++) begin
      slot_t s;
      int p1 [RK], p2 [RK];
      for (int i = 0; i < RK; i++) fdata[n][i] = int'($urandom_range(1, 0));
      for (int b = 0; b < RK; b += flen(n % 4, b)) turbo_encode(fdata[n], b, flen(n % 4, b), p1, p2);
      for (int i = 0; i < RK; i++) begin
        s.sys[i] = chan_llr(fdata[n][i], 7, 3);
        s.p1[i]  = chan_llr(p1[i], 7, 3);
        s.p2[i]  = chan_llr(p2[i], 7, 3);
        s.ext[i] = 0;
        s.hd[i]  = 0;
        ff_in_chan[i] = '{sys: ch_t'(s.sys[i]), p1: ch_t'(s.p1[i]), p2: ch_t'(s.p2[i])};
      end
      ef[n] = decode(s, n % 4, 8);
      ff_in_valid = 1;
      ff_in_cfg = cfg_e'(n % 4);
      tf[n] = cycles;
      @(negedge clk);
    end
    ff_in_valid = 0;
  end

  // ------------------------------------------------ afterburner decoder
  slot_t e6 [NA], e14 [NA];
  int    conv [NA], seen [NA], ta [NA];
  int    n_conv = 0, n_ab = 0, n_over = 0;
  logic  ab_done = 0;

  always @(negedge clk) if (rst_n) begin
    if (ab_out0_valid) begin
      int f;
      f = int'(ab_out0_tag);
      checks += 3;
      seen[f]++;
      if (cycles - ta[f] != LAT0) failures++;
      if (ab_out0_hda_fail != !conv[f]) begin failures++; $display("frame %0d HDA flag wrong", f); end
      for (int i = 0; i < K_MAX; i++) if (int'(ab_out0_hd[i]) != e6[f].hd[i]) begin failures++; break; end
      if (ab_out0_hda_fail) n_over++; else n_conv++;
    end
    if (ab_out1_valid) begin
      int f;
      f = int'(ab_out1_tag);
      checks += 3;
      seen[f]++;
      if (cycles - ta[f] != LAT1) begin failures++; $display("frame %0d afterburner latency %0d", f, cycles - ta[f]); end
      if (conv[f]) failures++;
      for (int i = 0; i < K_MAX; i++) if (int'(ab_out1_hd[i]) != e14[f].hd[i]) begin failures++; break; end
      n_ab++;
    end
  end

  initial begin
    ab_in_valid = 0;
    ab_in_tag = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < NA; n++) begin
      slot_t s;
      int d [RK], p1 [RK], p2 [RK];
      for (int i = 0; i < RK; i++) d[i] = int'($urandom_range(1, 0));
      turbo_encode(d, 0, RK, p1, p2);
      for (int i = 0; i < RK; i++) begin
        if (n < 8) begin
          s.sys[i] = chan_llr(d[i], 7, 3);
          s.p1[i]  = chan_llr(p1[i], 7, 3);
          s.p2[i]  = chan_llr(p2[i], 7, 3);
        end else begin
          s.sys[i] = int'($urandom_range(62, 0)) - 31;
          s.p1[i]  = int'($urandom_range(62, 0)) - 31;
          s.p2[i]  = int'($urandom_range(62, 0)) - 31;
        end
        s.ext[i] = 0;
        s.hd[i]  = 0;
        ab_in_chan[i] = '{sys: ch_t'(s.sys[i]), p1: ch_t'(s.p1[i]), p2: ch_t'(s.p2[i])};
      end
      e6[n]   = decode(s, 0, 6);
      e14[n]  = decode(s, 0, 14);
      conv[n] = (permute(decode(s, 0, 5), 0, 1).hd == permute(e6[n], 0, 1).hd);
      seen[n] = 0;
      ab_in_valid = 1;
      ab_in_tag = 8'(n);
      ta[n] = cycles;
      @(negedge clk);
    end
    ab_in_valid = 0;
    repeat (LAT1 + 10) @(negedge clk);

    checks += NA + 7;
    for (int n = 0; n < NA; n++) if (seen[n] != 1) begin failures++; $display("frame %0d seen %0d times", n, seen[n]); end
    if (nf_out != NS) begin failures++; $display("%0d of %0d slots", nf_out, NS); end
    for (int c = 0; c < 4; c++) if (cfg_out[c] == 0) begin failures++; $display("configuration %0d unused", c); end
    if (n_conv == 0) begin failures++; $display("no HDA pass"); end
    if (n_ab == 0) begin failures++; $display("afterburner unused"); end
    if (n_over == 0) begin failures++; $display("no overflow"); end
    $display("ff: %0d slots (configs %0d/%0d/%0d/%0d); ab: %0d passed HDA, %0d via afterburner, %0d overflow",
             nf_out, cfg_out[0], cfg_out[1], cfg_out[2], cfg_out[3], n_conv, n_ab, n_over);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
