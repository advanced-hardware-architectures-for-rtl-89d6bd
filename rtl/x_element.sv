// x_element: fully pipelined radix-4 max-Log-MAP decoder of one sub-block.
//
// A sub-block of W bits is N = W/2 radix-4 trellis steps. The element is a
// pipeline of N stages and accepts a new sub-block every clock cycle. Stage b
// runs the forward recursion unit for step b (alpha[b] -> alpha[b+1]) and the
// backward recursion unit for step N-1-b (beta[N-b] -> beta[N-1-b]), so the two
// recursions cross in the middle of the pipeline ("X" shape). From stage N/2 on,
// both alpha and beta around steps b and N-1-b are known and two LLR units
// produce the soft outputs of those steps. Each stage has one branch metric
// unit per recursion; the LLR units reuse those branch metrics.
//
// Between stages the pipeline registers hold only live values: the channel
// value FIFO (systematic and both parities of all W bits, needed downstream),
// the a-priori values until their step's LLR is done, the state metrics until
// their last use, and the finished extrinsic values and hard decisions.
//
// Inputs are taken combinationally by stage 0; outputs appear N cycles later.
// alpha_init/beta_init are the border state metrics (next iteration
// initialisation, or all zero). use_p2 selects parity 2 (second component
// decoder) and travels with the sub-block. alpha_end and beta_start are the
// metrics at the sub-block borders, returned for the next iteration.
module x_element
  import tdec_pkg::*;
#(
  parameter int W = W_XE
) (
  input  logic    clk,
  input  chan_t   in_chan [W],
  input  ext_t    in_apri [W],
  input  logic    in_use_p2,
  input  sm_vec_t alpha_init,
  input  sm_vec_t beta_init,
  output chan_t   out_chan [W],
  output ext_t    out_ext  [W],
  output logic    out_hd   [W],
  output sm_vec_t alpha_end,
  output sm_vec_t beta_start
);
  localparam int N = W / 2;

  // last stage that reads alpha[j] / beta[j] / the inputs of step j
  function automatic int llr_stage(input int j);
    return (j > N - 1 - j) ? j : N - 1 - j;
  endfunction
  function automatic int last_a(input int j);
    return (j == N) ? N : llr_stage(j);
  endfunction
  function automatic int last_b(input int j);
    return (j == 0) ? N : llr_stage(j - 1);
  endfunction

  // pipeline boundary b holds the inputs of stage b; boundary 0 is the input
  chan_t   ch_q [N+1][W];
  ext_t    ap_q [N+1][W];
  logic    p2_q [N+1];
  sm_vec_t a_q  [N+1][N+1];
  sm_vec_t b_q  [N+1][N+1];
  ext_t    e_q  [N+1][W];
  logic    h_q  [N+1][W];

  always_comb begin
    ch_q[0]    = in_chan;
    ap_q[0]    = in_apri;
    p2_q[0]    = in_use_p2;
    a_q[0][0]  = alpha_init;
    b_q[0][N]  = beta_init;
  end

  for (genvar b = 0; b < N; b++) begin : g_stage
    localparam int JF = b;          // step of the forward unit
    localparam int JB = N - 1 - b;  // step of the backward unit
    gam_vec_t g_f, g_b;
    sm_vec_t  a_new, b_new;
    ext_t     ef0, ef1, eb0, eb1;
    logic     hf0, hf1, hb0, hb1;

    bmu u_bmu_f (
      .ls0(ch_q[b][2*JF].sys),   .la0(ap_q[b][2*JF]),
      .ls1(ch_q[b][2*JF+1].sys), .la1(ap_q[b][2*JF+1]),
      .lp0(par_sel(ch_q[b][2*JF], p2_q[b])),
      .lp1(par_sel(ch_q[b][2*JF+1], p2_q[b])),
      .gamma(g_f)
    );
    bmu u_bmu_b (
      .ls0(ch_q[b][2*JB].sys),   .la0(ap_q[b][2*JB]),
      .ls1(ch_q[b][2*JB+1].sys), .la1(ap_q[b][2*JB+1]),
      .lp0(par_sel(ch_q[b][2*JB], p2_q[b])),
      .lp1(par_sel(ch_q[b][2*JB+1], p2_q[b])),
      .gamma(g_b)
    );
    fru u_fru (.alpha(a_q[b][JF]), .gamma(g_f), .alpha_next(a_new));
    bru u_bru (.beta_next(b_q[b][JB+1]), .gamma(g_b), .beta(b_new));

    if (b >= N / 2) begin : g_llr
      llr_unit u_llr_f (
        .alpha(a_q[b][JF]), .gamma(g_f), .beta_next(b_q[b][JF+1]),
        .ls0(ch_q[b][2*JF].sys), .la0(ap_q[b][2*JF]),
        .ls1(ch_q[b][2*JF+1].sys), .la1(ap_q[b][2*JF+1]),
        .ext0(ef0), .ext1(ef1), .hd0(hf0), .hd1(hf1)
      );
      llr_unit u_llr_b (
        .alpha(a_q[b][JB]), .gamma(g_b), .beta_next(b_q[b][JB+1]),
        .ls0(ch_q[b][2*JB].sys), .la0(ap_q[b][2*JB]),
        .ls1(ch_q[b][2*JB+1].sys), .la1(ap_q[b][2*JB+1]),
        .ext0(eb0), .ext1(eb1), .hd0(hb0), .hd1(hb1)
      );
    end else begin : g_no_llr
      assign {ef0, ef1, eb0, eb1} = '0;
      assign {hf0, hf1, hb0, hb1} = '0;
    end

    always_ff @(posedge clk) begin
      ch_q[b+1] <= ch_q[b];
      p2_q[b+1] <= p2_q[b];
      for (int j = 0; j <= N; j++) begin
        // forward metrics
        if (j == JF + 1)                            a_q[b+1][j] <= a_new;
        else if (j <= JF && last_a(j) >= b + 1)     a_q[b+1][j] <= a_q[b][j];
        // backward metrics
        if (j == JB)                                b_q[b+1][j] <= b_new;
        else if (j > JB && last_b(j) >= b + 1)      b_q[b+1][j] <= b_q[b][j];
      end
      for (int j = 0; j < N; j++) begin
        if (llr_stage(j) >= b + 1) begin
          ap_q[b+1][2*j]   <= ap_q[b][2*j];
          ap_q[b+1][2*j+1] <= ap_q[b][2*j+1];
        end
        if (llr_stage(j) < b) begin
          e_q[b+1][2*j]   <= e_q[b][2*j];
          e_q[b+1][2*j+1] <= e_q[b][2*j+1];
          h_q[b+1][2*j]   <= h_q[b][2*j];
          h_q[b+1][2*j+1] <= h_q[b][2*j+1];
        end
      end
      if (b >= N / 2) begin
        e_q[b+1][2*JF] <= ef0;  e_q[b+1][2*JF+1] <= ef1;
        h_q[b+1][2*JF] <= hf0;  h_q[b+1][2*JF+1] <= hf1;
        e_q[b+1][2*JB] <= eb0;  e_q[b+1][2*JB+1] <= eb1;
        h_q[b+1][2*JB] <= hb0;  h_q[b+1][2*JB+1] <= hb1;
      end
    end
  end

  assign out_chan   = ch_q[N];
  assign out_ext    = e_q[N];
  assign out_hd     = h_q[N];
  assign alpha_end  = a_q[N][N];
  assign beta_start = b_q[N][0];

  initial assert (N % 2 == 0) else $error("x_element: W/2 must be even");
endmodule
