`timescale 1ps / 1fs
// pattern_counter: occurrence count of one pattern class in a word, i.e.
// the number of set bits of a classified pattern vector ("adding each digit
// of the classified pattern"). Combinational adder tree via $countones;
// result range 0..WORD_W.
module pattern_counter
  import sfd_pkg::*;
(
  input  logic [WORD_W-1:0] vec,
  output count_t            cnt
);

  always_comb cnt = count_t'($countones(vec));

endmodule
