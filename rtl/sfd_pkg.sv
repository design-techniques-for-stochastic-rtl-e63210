`timescale 1ps / 1fs
// sfd_pkg: shared constants and types of the stochastic-frequency-detector
// (SFD) based referenceless CDR.
//
// The digital frequency loop works on 32-bit deserialized words of data
// samples D and edge samples E. Every data-edge-data triple (D[k-1], E[k],
// D[k]) falls into one of four pattern classes:
//   DN0 : 000 / 111   no transition
//   DN1 : 001 / 110   transition, edge sample equals the previous bit (early)
//   UP2 : 010 / 101   edge sample differs from both data bits
//   UP3 : 011 / 100   transition, edge sample equals the new bit (late)
// The class names, the 32-bit word, the 10-bit frequency control word and the
// default weights (-1,-4,+1,+7 for the counts, -5,-1,0,0 for their lag-1
// autocovariances) follow the design description. Widths of weights, means
// and the fixed-point formats are this implementation's own choices.
package sfd_pkg;

  localparam int unsigned WORD_W  = 32;                   // deserialized word
  localparam int unsigned NPAT    = 4;                    // pattern classes
  localparam int unsigned CNT_W   = $clog2(WORD_W + 1);   // 0..32 -> 6 bits
  localparam int unsigned FCW_W   = 10;                   // DCO control word
  localparam int unsigned WGT_W   = 5;                    // signed weight
  localparam int unsigned MEAN_FRAC = 4;                  // mean: Q6.4
  localparam int unsigned MEAN_W  = CNT_W + MEAN_FRAC;    // 10 bits
  // autocovariance, scaled by 2^(2*MEAN_FRAC): signed
  localparam int unsigned ACOV_W  = 2 * MEAN_W + 1;       // 21 bits
  // weighted SFD output, signed
  localparam int unsigned FD_W    = 28;

  typedef enum logic [1:0] {
    PAT_DN0 = 2'd0,
    PAT_DN1 = 2'd1,
    PAT_UP2 = 2'd2,
    PAT_UP3 = 2'd3
  } pattern_e;

  typedef logic [CNT_W-1:0]          count_t;
  typedef count_t                    count_arr_t [NPAT];
  typedef logic signed [WGT_W-1:0]   weight_t;
  typedef weight_t                   weight_arr_t [NPAT];
  typedef logic [MEAN_W-1:0]         mean_t;
  typedef mean_t                     mean_arr_t [NPAT];
  typedef logic signed [ACOV_W-1:0]  acov_t;
  typedef acov_t                     acov_arr_t [NPAT];
  typedef logic signed [FD_W-1:0]    fd_t;

  // Default weights of the proposed SFD (pattern counts, autocovariances).
  localparam weight_t W_CNT_DEF  [NPAT] = '{-5'sd1, -5'sd4, 5'sd1, 5'sd7};
  localparam weight_t W_ACOV_DEF [NPAT] = '{-5'sd5, -5'sd1, 5'sd0, 5'sd0};

endpackage
