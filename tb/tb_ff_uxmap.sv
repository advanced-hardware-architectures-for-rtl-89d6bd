// tb_ff_uxmap: end-to-end test of the frame flexible decoder at its default
// size (8 half-iteration stages, 128-bit slots).
//
// Frames are turbo encoded (tail-biting, ARP interleaver of their own size)
// and sent as channel LLRs, one slot per cycle with a few idle cycles, cycling
// through the four slot configurations. Each output slot is compared bit for
// bit with the reference decoder model and must appear exactly 8 x 16 cycles
// after its input. Lightly disturbed frames must decode without error; for
// noisy frames (channel hard decisions wrong in places) the number of frames
// whose errors were all corrected is counted and must be non-zero. Each
// configuration and back-to-back slot acceptance must occur.
module tb_ff_uxmap;
  import tdec_pkg::*;
  import tdec_ref_pkg::*;
  localparam int N_HI = 8;
  localparam int LAT  = N_HI * N_STEP;
  localparam int NS   = 36;
  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0, cycles = 0;

  logic  in_valid, out_valid;
  cfg_e  in_cfg, out_cfg;
  chan_t in_chan [K_MAX];
  logic  out_hd [K_MAX];

  ff_uxmap dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles == 3000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int    data  [NS][RK];
  int    noisy [NS];
  slot_t exp_s [NS];
  cfg_e  s_cfg [NS];
  int    t_in  [NS];
  int    n_out = 0;
  int    cfg_out [4];
  int    back_to_back = 0;
  int    clean_ok = 0, clean_bad = 0, noisy_fixed = 0, noisy_total = 0, raw_err_frames = 0;

  // output monitor
  always @(negedge clk) if (rst_n && out_valid) begin
    int f;
    f = n_out++;
    checks += 2;
    if (f >= NS) begin failures++; $display("unexpected output slot"); end
    else begin
      if (cycles - t_in[f] != LAT) begin
        failures++;
        $display("slot %0d latency %0d, expected %0d", f, cycles - t_in[f], LAT);
      end
      if (out_cfg != s_cfg[f]) failures++;
      cfg_out[int'(out_cfg)]++;
      for (int i = 0; i < K_MAX; i++) begin
        checks++;
        if (int'(out_hd[i]) != exp_s[f].hd[i]) begin
          failures++;
          if (failures < 10) $display("slot %0d bit %0d differs from the reference model", f, i);
        end
      end
      // decoding success per frame of the slot
      for (int b = 0; b < K_MAX; b += flen(int'(s_cfg[f]), b)) begin
        int errs;
        errs = 0;
        for (int i = b; i < b + flen(int'(s_cfg[f]), b); i++) errs += (int'(out_hd[i]) != data[f][i]);
        if (noisy[f]) begin
          noisy_total++;
          if (errs == 0) noisy_fixed++;
        end else if (errs == 0) clean_ok++;
        else clean_bad++;
      end
    end
  end

  initial begin
    in_valid = 0;
    in_cfg   = CFG_128;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NS; n++) begin
      slot_t s;
      int p1 [RK], p2 [RK];
      if (n % 7 == 6) begin
        in_valid = 0;
        @(negedge clk);
      end
      s_cfg[n] = cfg_e'(n % 4);
      noisy[n] = (n % 3 == 2);
      for (int i = 0; i < RK; i++) data[n][i] = int'($urandom_range(1, 0));
      for (int b = 0; b < RK; b += flen(n % 4, b)) turbo_encode(data[n], b, flen(n % 4, b), p1, p2);
      for (int i = 0; i < RK; i++) begin
        int amp, nz;
        amp = noisy[n] ? 4 : 7;
        nz  = noisy[n] ? 7 : 3;
        s.sys[i] = chan_llr(data[n][i], amp, nz);
        s.p1[i]  = chan_llr(p1[i], amp, nz);
        s.p2[i]  = chan_llr(p2[i], amp, nz);
        s.ext[i] = 0;
        s.hd[i]  = 0;
        in_chan[i].sys = ch_t'(s.sys[i]);
        in_chan[i].p1  = ch_t'(s.p1[i]);
        in_chan[i].p2  = ch_t'(s.p2[i]);
        if (noisy[n] && ((s.sys[i] < 0) != (data[n][i] == 1))) raw_err_frames++;
      end
      exp_s[n] = decode(s, n % 4, N_HI);
      if (in_valid) back_to_back++;
      in_valid = 1;
      in_cfg   = s_cfg[n];
      t_in[n]  = cycles;
      @(negedge clk);
    end
    in_valid = 0;
    repeat (LAT + 5) @(negedge clk);

    checks += 8;
    if (n_out != NS) begin failures++; $display("%0d of %0d slots came out", n_out, NS); end
    for (int c = 0; c < 4; c++)
      if (cfg_out[c] == 0) begin failures++; $display("configuration %0d never decoded", c); end
    if (back_to_back == 0) begin failures++; $display("no back-to-back slots"); end
    if (clean_bad != 0) begin failures++; $display("%0d lightly disturbed frames not decoded", clean_bad); end
    if (raw_err_frames == 0) begin failures++; $display("noise never caused a channel error"); end
    if (noisy_fixed == 0) begin failures++; $display("no noisy frame corrected"); end
    $display("frames: %0d clean decoded, %0d of %0d noisy frames fully corrected (channel bit errors: %0d); %0d back-to-back slots",
             clean_ok, noisy_fixed, noisy_total, raw_err_frames, back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
