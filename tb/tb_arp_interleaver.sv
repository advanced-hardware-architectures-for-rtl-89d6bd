// tb_arp_interleaver: for every direction and every slot configuration,
// permutes random slots and compares each output position with the
// reference ARP permutation PI(i) = (9 i + S[i mod 4]) mod K applied per
// frame. Also checks that each PI_K is a permutation and that PI followed by
// PI^-1 restores the slot, and reports how many positions of the 128-bit
// interleaver share their source with the 2 x 64 configuration.
module tb_arp_interleaver;
  import tdec_pkg::*;
  import tdec_ref_pkg::*;
  logic  clk = 0;
  int    checks = 0, failures = 0, cycles = 0;
  perm_e perm;
  cfg_e  cfg;
  pos_t  din [K_MAX], dout [K_MAX], back [K_MAX];

  arp_interleaver dut (.perm, .cfg, .din, .dout);
  arp_interleaver u_inv (.perm(PERM_PI_INV), .cfg, .din(dout), .dout(back));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles == 10000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int shared;
    for (int k = 32; k <= 128; k *= 2) begin
      int seen [128];
      for (int i = 0; i < 128; i++) seen[i] = 0;
      for (int i = 0; i < k; i++) seen[arp(k, i)]++;
      for (int i = 0; i < k; i++) begin
        checks++;
        if (seen[i] != 1) failures++;
      end
    end
    shared = 0;
    for (int i = 0; i < 128; i++)
      if (perm_src(CFG_128, PERM_PI, i) == perm_src(CFG_64_64, PERM_PI, i)) shared++;
    $display("PI_128 and 2 x PI_64 agree on %0d of 128 positions", shared);

    for (int n = 0; n < 48; n++) begin
      slot_t s, r;
      perm = perm_e'(n % 3);
      cfg  = cfg_e'((n / 3) % 4);
      for (int i = 0; i < K_MAX; i++) begin
        din[i] = pos_t'({$urandom, $urandom});
        s.sys[i] = int'(din[i].chan.sys); s.p1[i] = int'(din[i].chan.p1);
        s.p2[i]  = int'(din[i].chan.p2);  s.ext[i] = int'(din[i].ext);
        s.hd[i]  = int'(din[i].hd);
      end
      @(posedge clk);
      r = permute(s, int'(cfg), int'(perm));
      for (int i = 0; i < K_MAX; i++) begin
        checks++;
        if (int'(dout[i].chan.sys) != r.sys[i] || int'(dout[i].chan.p1) != r.p1[i] ||
            int'(dout[i].chan.p2) != r.p2[i] || int'(dout[i].ext) != r.ext[i] ||
            int'(dout[i].hd) != r.hd[i]) begin
          failures++;
          if (failures < 10) $display("perm %0d cfg %0d position %0d wrong", perm, cfg, i);
        end
        if (perm == PERM_PI) begin
          checks++;
          if (back[i] != din[i]) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
