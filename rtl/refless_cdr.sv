`timescale 1ps / 1fs
// refless_cdr: quarter-rate referenceless clock and data recovery with a
// stochastic frequency detector (SFD) using autocovariance.
//
// Without a reference clock the receiver must find the data rate from the
// data itself. Two loops share one DCO:
//  * phase loop (direct-proportional, fast): eight samplers on the eight DCO
//    phases take four data and four edge samples per DCO period; a bang-bang
//    phase detector turns them into four up/dn pairs that nudge the DCO
//    frequency through its varactors;
//  * frequency loop (integral, slow): two 4:32 deserializers hand 32-bit
//    data and edge words to the digital block, whose SFD counts the four
//    data-edge-data pattern classes and their lag-1 autocovariances, weights
//    them into a frequency error, integrates it into a 10-bit FCW and
//    decodes that into the DCR thermometer code.
// The input is the equalized serial stream (the continuous-time equalizer
// in front of the samplers is outside this model). The DCO is a behavioural
// model, so this top simulates but does not synthesize as a whole.
// Outputs: the recovered quarter-rate clock (ph[0]), the divided word clock,
// the recovered 32-bit data word (bit 0 first) and the FCW.
module refless_cdr
  import sfd_pkg::*;
(
  input  logic              rst_n,
  input  logic              dco_en,
  input  logic              rx_in,                // equalized serial data
  input  logic [2:0]        kp,                   // proportional gain
  input  logic [3:0]        ki,                   // integral gain exponent
  input  logic [FCW_W-1:0]  init_fcw,             // initial DCO code
  input  weight_t           w_cnt  [NPAT],
  input  weight_t           w_acov [NPAT],
  input  mean_t             mean   [NPAT],
  output logic              clk_rec,              // recovered clock
  output logic              clk_div,              // word clock
  output logic [WORD_W-1:0] data_word,            // recovered data
  output logic [FCW_W-1:0]  fcw,
  output logic [3:0]        pd_up,
  output logic [3:0]        pd_dn
);

  logic [7:0]        ph;
  logic [3:0]        d_q, e_q;
  logic [WORD_W-1:0] e_word;
  logic              clk_div_e;
  logic [31:0]       row_full, row_sel, col;
  fd_t               fd;
  logic              sat_hi, sat_lo;
  real               f_ghz;

  dco u_dco (
    .en(dco_en), .row_full, .row_sel, .col, .kp,
    .up(pd_up), .dn(pd_dn), .ph, .f_ghz
  );

  sampler_bank u_smp (.rst_n, .din(rx_in), .ph, .d_q, .e_q);

  bbpd u_bbpd (.clk_q(ph[0]), .rst_n, .d(d_q), .e(e_q), .up(pd_up), .dn(pd_dn));

  deserializer u_des_d (.clk_q(ph[0]), .rst_n, .din(d_q), .dout(data_word), .clk_div(clk_div));
  deserializer u_des_e (.clk_q(ph[0]), .rst_n, .din(e_q), .dout(e_word),    .clk_div(clk_div_e));

  cdr_digital u_dig (
    .clk(clk_div), .rst_n, .d_word(data_word), .e_word, .w_cnt, .w_acov, .mean,
    .ki, .init_fcw, .fd, .fcw, .sat_hi, .sat_lo, .row_full, .row_sel, .col
  );

  assign clk_rec = ph[0];

endmodule
