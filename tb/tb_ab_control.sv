// tb_ab_control: drives the afterburner control with hard decisions of the
// last two half-iterations (the earlier ones 16 cycles ahead, as in the
// pipeline) and a random afterburner-free signal. Checks for every frame the
// HDA decision and its routing: equal decisions leave on output 0, unequal
// ones enter the afterburner when it is free and otherwise leave on output 0
// flagged as an overflow. Each of the three cases must occur.
module tb_ab_control;
  import tdec_pkg::*;
  localparam int LAT = N_STEP;
  localparam int NF  = 200;
  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0, cycles = 0;

  logic       prev_hd [K_MAX], last_hd_raw [K_MAX], last_hd [K_MAX], out0_hd [K_MAX];
  logic       last_valid, ab_free, ab_enter, out0_valid, out0_hda_fail;
  logic [7:0] last_tag, out0_tag;

  ab_control #(.TAG_W(8), .LAT(LAT)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles == 10000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [K_MAX-1:0] hist [NF + LAT];
  int n_conv = 0, n_enter = 0, n_over = 0;

  initial begin
    last_valid = 0;
    ab_free = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NF + LAT; n++) begin
      logic [K_MAX-1:0] ph;
      @(negedge clk);
      ph = {$urandom, $urandom, $urandom, $urandom};
      hist[n] = ph;
      for (int i = 0; i < K_MAX; i++) prev_hd[i] = ph[i];
      if (n >= LAT) begin
        logic [K_MAX-1:0] lh;
        logic same;
        same = ($urandom_range(2, 0) == 0);
        lh = hist[n - LAT];
        if (!same) lh[$urandom_range(K_MAX - 1, 0)] ^= 1'b1;
        for (int i = 0; i < K_MAX; i++) begin
          last_hd_raw[i] = lh[i];
          last_hd[i] = 1'($urandom);
        end
        last_valid = (n % 11 != 3);
        last_tag   = 8'(n);
        ab_free    = 1'($urandom);
        #1;
        checks += 4;
        if (ab_enter != (last_valid && !same && ab_free)) begin failures++; $display("enter wrong at %0d", n); end
        if (out0_valid != (last_valid && (same || !ab_free))) failures++;
        if (out0_hda_fail != (last_valid && !same && !ab_free)) failures++;
        if (out0_tag != 8'(n)) failures++;
        for (int i = 0; i < K_MAX; i++) begin
          checks++;
          if (out0_hd[i] != last_hd[i]) failures++;
        end
        if (last_valid && same) n_conv++;
        if (ab_enter) n_enter++;
        if (out0_hda_fail) n_over++;
      end
    end
    checks += 3;
    if (n_conv == 0) failures++;
    if (n_enter == 0) failures++;
    if (n_over == 0) failures++;
    $display("converged %0d, to afterburner %0d, overflow %0d", n_conv, n_enter, n_over);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
