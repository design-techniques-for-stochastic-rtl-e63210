`timescale 1ps / 1fs
// pattern_classifier: sorts every data-edge-data triple of a deserialized
// word into one of the four SFD pattern classes (see sfd_pkg).
//
// Bit 0 of a word is the earliest bit. Edge sample e[k] is taken between data
// bits d[k-1] and d[k], so triple k is (d[k-1], e[k], d[k]); for k = 0 the
// previous data bit is d_prev_msb, bit 31 of the previous word. This is the
// "shift the data word left by one bit and combine it bitwise with D and E"
// operation of the design description. Each output vector has one bit per
// triple and exactly one of the four vectors is set for every k.
// Purely combinational; the caller registers the result.
module pattern_classifier
  import sfd_pkg::*;
(
  input  logic [WORD_W-1:0] d,           // data samples, bit 0 first
  input  logic [WORD_W-1:0] e,           // edge samples, e[k] before d[k]
  input  logic              d_prev_msb,  // d[31] of the previous word
  output logic [WORD_W-1:0] dn0,         // 000 / 111
  output logic [WORD_W-1:0] dn1,         // 001 / 110
  output logic [WORD_W-1:0] up2,         // 010 / 101
  output logic [WORD_W-1:0] up3          // 011 / 100
);

  logic [WORD_W-1:0] d_sh;   // d_sh[k] = d[k-1]
  logic [WORD_W-1:0] trans;  // data transition inside triple k
  logic [WORD_W-1:0] e_old;  // edge sample equals the older data bit

  always_comb begin
    d_sh  = {d[WORD_W-2:0], d_prev_msb};
    trans = d_sh ^ d;
    e_old = ~(e ^ d_sh);
    dn0   = ~trans &  e_old;
    up2   = ~trans & ~e_old;
    dn1   =  trans &  e_old;
    up3   =  trans & ~e_old;
  end

endmodule
