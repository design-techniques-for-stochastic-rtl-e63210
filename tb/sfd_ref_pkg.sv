`timescale 1ps / 1fs
// sfd_ref_pkg: independent reference arithmetic for the SFD testbenches.
// Classification uses the 3-bit pattern number N = {d[k-1], e[k], d[k]}:
// N in {0,7} -> dn0, {1,6} -> dn1, {2,5} -> up2, {3,4} -> up3.
package sfd_ref_pkg;

  typedef int cnt4_t [4];

  function automatic int pat_class(bit a, bit b, bit c);
    int n;
    n = {29'd0, a, b, c};
    case (n)
      0, 7:    return 0;
      1, 6:    return 1;
      2, 5:    return 2;
      default: return 3;
    endcase
  endfunction

  function automatic cnt4_t count_word(bit [31:0] d, bit [31:0] e, bit prev);
    cnt4_t c;
    bit    a;
    c = '{0, 0, 0, 0};
    a = prev;
    for (int k = 0; k < 32; k++) begin
      c[pat_class(a, e[k], d[k])]++;
      a = d[k];
    end
    return c;
  endfunction

  // detector value times 2^18 (counts scaled by 2^13, autocovariances by 2^8)
  function automatic longint fd_value(cnt4_t c, cnt4_t c_prev, int w[4], int wa[4], int mean[4]);
    longint s;
    s = 0;
    for (int p = 0; p < 4; p++) begin
      s += longint'(w[p]) * c[p] * 8192;
      s += longint'(wa[p]) * (longint'(c[p]) * c_prev[p] * 256 - longint'(mean[p]) * mean[p]);
    end
    return s;
  endfunction

endpackage
