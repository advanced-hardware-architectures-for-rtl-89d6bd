// tb_afterburner: offers 40 encoded, noisy 128-bit frames to the afterburner
// as fast as it accepts them. The first 32 fill every slot; the rest wait
// until slots free up. Each frame must leave exactly AB_HI x AB_SLOTS = 256
// cycles after it entered, with the hard decisions of the reference model
// after 8 half-iterations, and the afterburner must refuse entries while full.
module tb_afterburner;
  import tdec_pkg::*;
  import tdec_ref_pkg::*;
  localparam int AB_HI = 8, AB_SLOTS = 32, NF = 40;
  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0, cycles = 0;

  logic       enter, entry_free, out_valid;
  logic [7:0] enter_tag, out_tag;
  pos_t       enter_pos [K_MAX];
  nii_t       enter_nii_same [N_XE], enter_nii_other [N_XE];
  logic       out_hd [K_MAX];

  afterburner #(.AB_HI(AB_HI), .AB_SLOTS(AB_SLOTS), .TAG_W(8)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles == 3000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  slot_t exp_s [NF];
  int    data [NF][RK];
  int    t_in [NF];
  int    n_out = 0, n_ok = 0, full_cycles = 0, max_occ = 0, occ = 0;

  always @(negedge clk) if (rst_n) begin
    if (!entry_free) full_cycles++;
    if (out_valid) begin
      int f;
      f = int'(out_tag);
      n_out++;
      occ--;
      checks += 2;
      if (f >= NF) failures++;
      else begin
        int errs;
        errs = 0;
        if (cycles - t_in[f] != AB_HI * AB_SLOTS) begin
          failures++;
          $display("frame %0d left after %0d cycles", f, cycles - t_in[f]);
        end
        for (int i = 0; i < K_MAX; i++) begin
          checks++;
          if (int'(out_hd[i]) != exp_s[f].hd[i]) failures++;
          errs += (int'(out_hd[i]) != data[f][i]);
        end
        if (errs == 0) n_ok++;
      end
    end
  end

  initial begin
    enter = 0;
    enter_tag = 0;
    for (int x = 0; x < N_XE; x++) begin enter_nii_same[x] = '0; enter_nii_other[x] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NF; n++) begin
      slot_t s;
      int p1 [RK], p2 [RK];
      for (int i = 0; i < RK; i++) data[n][i] = int'($urandom_range(1, 0));
      turbo_encode(data[n], 0, RK, p1, p2);
      for (int i = 0; i < RK; i++) begin
        s.sys[i] = chan_llr(data[n][i], 5, 6);
        s.p1[i]  = chan_llr(p1[i], 5, 6);
        s.p2[i]  = chan_llr(p2[i], 5, 6);
        s.ext[i] = 0;
        s.hd[i]  = 0;
        enter_pos[i].chan.sys = ch_t'(s.sys[i]);
        enter_pos[i].chan.p1  = ch_t'(s.p1[i]);
        enter_pos[i].chan.p2  = ch_t'(s.p2[i]);
        enter_pos[i].ext = '0;
        enter_pos[i].hd  = 1'b0;
      end
      exp_s[n] = decode(s, 0, AB_HI);
      enter_tag = 8'(n);
      #1;
      while (!entry_free) begin @(negedge clk); #1; end
      enter = 1;
      t_in[n] = cycles;
      occ++;
      if (occ > max_occ) max_occ = occ;
      @(negedge clk);
      enter = 0;
    end
    repeat (AB_HI * AB_SLOTS + 10) @(negedge clk);
    checks += 4;
    if (n_out != NF) begin failures++; $display("%0d of %0d frames left", n_out, NF); end
    if (max_occ != AB_SLOTS) begin failures++; $display("occupancy peaked at %0d", max_occ); end
    if (full_cycles == 0) begin failures++; $display("never full"); end
    if (n_ok == 0) failures++;
    $display("%0d of %0d frames decoded without error; full for %0d cycles", n_ok, NF, full_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
