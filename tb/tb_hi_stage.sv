// tb_hi_stage: streams random frame slots (random configuration, decoder,
// output permutation, tag and border metrics) into one half-iteration stage,
// one per cycle with a few idle cycles, and checks 16 cycles later every
// output position, the raw hard decisions, the stage's own border metrics,
// the delayed carry metrics and the valid/configuration/tag sideband against
// the reference stage model.
module tb_hi_stage;
  import tdec_pkg::*;
  import tdec_ref_pkg::*;
  localparam int NF  = 64;
  localparam int LAT = N_STEP;
  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0, cycles = 0;

  logic       in_valid, in_use_p2, out_valid;
  cfg_e       in_cfg, out_cfg;
  perm_e      in_perm;
  logic [3:0] in_tag, out_tag;
  pos_t       in_pos [K_MAX], out_pos [K_MAX];
  logic       out_hd_raw [K_MAX];
  nii_t       nii_use [N_XE], nii_carry_in [N_XE], nii_own [N_XE], nii_carry_out [N_XE];

  hi_stage #(.TAG_W(4)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles == 10000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  slot_t  e_out [NF];
  slot_t  e_raw [NF];
  nii_r_t e_own [NF];
  nii_t   e_carry [NF][N_XE];
  logic   e_valid [NF];
  cfg_e   e_cfg [NF];
  logic [3:0] e_tag [NF];
  int     cfg_seen [4];

  task automatic check(input int f);
    checks++;
    if (out_valid != e_valid[f]) begin failures++; $display("slot %0d valid", f); end
    if (!e_valid[f]) return;
    checks += 2;
    if (out_cfg != e_cfg[f]) failures++;
    if (out_tag != e_tag[f]) failures++;
    for (int i = 0; i < K_MAX; i++) begin
      checks += 2;
      if (int'(out_pos[i].chan.sys) != e_out[f].sys[i] || int'(out_pos[i].chan.p1) != e_out[f].p1[i] ||
          int'(out_pos[i].chan.p2) != e_out[f].p2[i] || int'(out_pos[i].ext) != e_out[f].ext[i] ||
          int'(out_pos[i].hd) != e_out[f].hd[i]) begin
        failures++;
        if (failures < 10) $display("slot %0d position %0d: ext %0d vs %0d", f, i, out_pos[i].ext, e_out[f].ext[i]);
      end
      if (int'(out_hd_raw[i]) != e_raw[f].hd[i]) failures++;
    end
    for (int x = 0; x < N_XE; x++) begin
      checks += 2;
      if (nii_carry_out[x] != e_carry[f][x]) failures++;
      for (int s = 0; s < 8; s++)
        if (int'(sm_t'(nii_own[x].alpha_end[s])) != e_own[f].a_end[x][s] ||
            int'(sm_t'(nii_own[x].beta_start[s])) != e_own[f].b_start[x][s]) begin
          failures++;
          if (failures < 10) $display("slot %0d xe %0d border metric state %0d", f, x, s);
          break;
        end
    end
  endtask

  initial begin
    in_valid = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NF + LAT; n++) begin
      @(negedge clk);
      if (n >= LAT) check(n - LAT);
      if (n < NF) begin
        slot_t  s;
        nii_r_t nu;
        in_valid  = (n % 9 != 4);
        in_cfg    = cfg_e'($urandom_range(3, 0));
        in_use_p2 = 1'($urandom);
        in_perm   = perm_e'($urandom_range(2, 0));
        in_tag    = 4'(n);
        if (in_valid) cfg_seen[int'(in_cfg)]++;
        for (int i = 0; i < K_MAX; i++) begin
          in_pos[i] = pos_t'({$urandom, $urandom});
          in_pos[i].ext = ext_t'($urandom_range(126, 0) - 63);
          s.sys[i] = int'(in_pos[i].chan.sys); s.p1[i] = int'(in_pos[i].chan.p1);
          s.p2[i]  = int'(in_pos[i].chan.p2);  s.ext[i] = int'(in_pos[i].ext);
          s.hd[i]  = int'(in_pos[i].hd);
        end
        for (int x = 0; x < N_XE; x++) begin
          nii_carry_in[x] = nii_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                                     $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
          e_carry[n][x] = nii_carry_in[x];
          for (int st = 0; st < 8; st++) begin
            int a, b;
            a = (st == 0) ? 0 : int'($urandom_range(800, 0)) - 400;
            b = (st == 0) ? 0 : int'($urandom_range(800, 0)) - 400;
            nii_use[x].alpha_end[st]  = SM_W'(a);
            nii_use[x].beta_start[st] = SM_W'(b);
            nu.a_end[x][st]   = a;
            nu.b_start[x][st] = b;
          end
        end
        e_valid[n] = in_valid;
        e_cfg[n]   = in_cfg;
        e_tag[n]   = in_tag;
        hi_stage(s, int'(in_cfg), int'(in_use_p2), 0, nu, e_raw[n], e_own[n]);
        e_out[n] = permute(e_raw[n], int'(in_cfg), int'(in_perm));
      end else begin
        in_valid = 0;
      end
    end
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (cfg_seen[c] == 0) begin failures++; $display("configuration %0d never used", c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
