`timescale 1ps / 1fs
// sfd_logic: stochastic frequency detector with autocovariance.
//
// Each digital clock cycle it takes one 32-bit data word and one 32-bit edge
// word from the deserializers and produces a signed frequency-error sample fd
// (positive: raise the DCO frequency). It
//   1. classifies all 32 data-edge-data triples into dn0/dn1/up2/up3,
//   2. counts each class (0..32 per word),
//   3. forms the lag-1 autocovariance of each count, c[n]c[n-1] - mu^2,
//   4. returns the weighted sum of the four counts and four autocovariances.
// Steps 1-4 and the default weights (counts -1,-4,+1,+7; autocovariances
// -5,-1,0,0) follow the design description; weights and means are inputs.
//
// Scaling (own choice): with P = count/32 and gamma = autocovariance of P,
// the detector value is sum(w*P) + sum(wa*gamma). fd carries that value times
// 2^18 exactly: fd = sum(w*cnt) << (5 + 2*MEAN_FRAC) + sum(wa*acov), where
// acov is already scaled by 2^(2*MEAN_FRAC).
//
// Timing: three register stages. The word presented before clock edge t
// reaches cnt after edge t, its autocovariance after t+1 and fd after t+2.
module sfd_logic
  import sfd_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [WORD_W-1:0] d_word,
  input  logic [WORD_W-1:0] e_word,
  input  weight_t           w_cnt  [NPAT],  // weights of dn0,dn1,up2,up3
  input  weight_t           w_acov [NPAT],  // weights of adn0..aup3
  input  mean_t             mean   [NPAT],  // mean count per word, Q6.4
  output count_t            cnt    [NPAT],  // registered class counts
  output acov_t             acov   [NPAT],  // registered autocovariances
  output fd_t               fd              // frequency error sample
);

  localparam int unsigned CNT_SHIFT = $clog2(WORD_W) + 2 * MEAN_FRAC;  // 13

  logic              d_prev_msb;
  logic [WORD_W-1:0] pvec [NPAT];
  count_t            cnt_d  [NPAT];
  count_t            cnt_q2 [NPAT];
  fd_t               fd_d;

  pattern_classifier u_class (
    .d          (d_word),
    .e          (e_word),
    .d_prev_msb (d_prev_msb),
    .dn0        (pvec[PAT_DN0]),
    .dn1        (pvec[PAT_DN1]),
    .up2        (pvec[PAT_UP2]),
    .up3        (pvec[PAT_UP3])
  );

  for (genvar p = 0; p < NPAT; p++) begin : g_pat
    pattern_counter u_cnt (.vec(pvec[p]), .cnt(cnt_d[p]));
    autocov u_acov (.clk(clk), .rst_n(rst_n), .cnt(cnt[p]), .mean(mean[p]), .acov(acov[p]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_prev_msb <= 1'b0;
      cnt        <= '{default: '0};
      cnt_q2     <= '{default: '0};
    end else begin
      d_prev_msb <= d_word[WORD_W-1];
      cnt        <= cnt_d;
      cnt_q2     <= cnt;
    end
  end

  always_comb begin
    fd_t sum_cnt;
    fd_t sum_acov;
    sum_cnt  = '0;
    sum_acov = '0;
    for (int p = 0; p < NPAT; p++) begin
      sum_cnt  += fd_t'(w_cnt[p]) * fd_t'(signed'({1'b0, cnt_q2[p]}));
      sum_acov += fd_t'(w_acov[p]) * fd_t'(acov[p]);
    end
    fd_d = (sum_cnt <<< CNT_SHIFT) + sum_acov;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) fd <= '0;
    else        fd <= fd_d;
  end

endmodule
