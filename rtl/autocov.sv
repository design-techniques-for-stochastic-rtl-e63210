`timescale 1ps / 1fs
// autocov: lag-1 autocovariance sample of one pattern count.
//
// For a wide-sense-stationary count sequence c[n] the autocovariance at lag h
// is E[c[n]c[n+h]] - mu^2. The SFD takes h = one digital clock cycle, so each
// cycle this block forms c[n]*c[n-1] - mu^2, where mu is the long-run mean of
// the count, supplied from outside (the design description states that the
// mean values are inputs). The expectation is taken by the loop filter, which
// integrates the samples.
//
// Number formats (own choice): mean is unsigned Q6.MEAN_FRAC in counts per
// word; the output is signed and scaled by 2^(2*MEAN_FRAC) so no bits are lost:
//   acov = (c[n]*c[n-1]) << 2*MEAN_FRAC  -  mean*mean
// Timing: one register stage. acov for word n is valid the cycle after cnt
// carries word n. The previous count resets to 0.
module autocov
  import sfd_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  count_t cnt,    // c[n]
  input  mean_t  mean,   // mu, unsigned Q6.MEAN_FRAC
  output acov_t  acov    // c[n]c[n-1] - mu^2, scaled by 2^(2*MEAN_FRAC)
);

  count_t                    cnt_prev;
  logic [2*CNT_W-1:0]        prod;
  logic [2*MEAN_W-1:0]       prod_s;
  logic [2*MEAN_W-1:0]       mean_sq;
  acov_t                     acov_d;

  always_comb begin
    prod    = cnt * cnt_prev;
    prod_s  = {prod, {(2*MEAN_FRAC){1'b0}}};
    mean_sq = mean * mean;
    acov_d  = acov_t'({1'b0, prod_s}) - acov_t'({1'b0, mean_sq});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_prev <= '0;
      acov     <= '0;
    end else begin
      cnt_prev <= cnt;
      acov     <= acov_d;
    end
  end

endmodule
