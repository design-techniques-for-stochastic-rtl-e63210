`timescale 1ps / 1fs
// cdr_digital: digital block of the CDR, the frequency-tracking loop.
//
// Runs on the divided clock (one 32-bit word per cycle, 1 GHz at 32 Gb/s).
// sfd_logic turns each data/edge word pair into a frequency-error sample,
// dlf integrates it into the 10-bit frequency control word, and
// therm_decoder turns the FCW into the DCR's row/column thermometer code.
// Phase tracking is not done here: it is left to the analog direct-
// proportional path (bbpd -> dco varactors). Structure follows the design
// description. Latency from a word to the thermometer code is five cycles
// (three SFD stages, the accumulator, the decoder register).
module cdr_digital
  import sfd_pkg::*;
#(
  parameter int unsigned FRAC = 24,
  parameter int unsigned KI_W = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [WORD_W-1:0] d_word,
  input  logic [WORD_W-1:0] e_word,
  input  weight_t           w_cnt  [NPAT],
  input  weight_t           w_acov [NPAT],
  input  mean_t             mean   [NPAT],
  input  logic [KI_W-1:0]   ki,
  input  logic [FCW_W-1:0]  init_fcw,
  output fd_t               fd,
  output logic [FCW_W-1:0]  fcw,
  output logic              sat_hi,
  output logic              sat_lo,
  output logic [31:0]       row_full,
  output logic [31:0]       row_sel,
  output logic [31:0]       col
);

  count_t cnt  [NPAT];
  acov_t  acov [NPAT];

  sfd_logic u_sfd (
    .clk, .rst_n, .d_word, .e_word, .w_cnt, .w_acov, .mean,
    .cnt(cnt), .acov(acov), .fd(fd)
  );

  dlf #(.FRAC(FRAC), .KI_W(KI_W)) u_dlf (
    .clk, .rst_n, .fd, .ki, .init_fcw, .fcw, .sat_hi, .sat_lo
  );

  therm_decoder u_therm (
    .clk, .rst_n, .fcw, .row_full, .row_sel, .col
  );

endmodule
