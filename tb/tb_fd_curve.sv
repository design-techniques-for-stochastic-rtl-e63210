`timescale 1ps / 1fs
// tb_fd_curve: open-loop frequency-detector curve at 32 Gb/s PRBS7.
// The integral path is opened: the DCO code is held by the testbench while
// the direct-proportional path (samplers -> bbpd -> DCO varactor term) stays
// active, and the detector output fd of sfd_logic is averaged over 2000 words
// at each of five codes (two codes apart) around every sweep point. The
// source carries a few picoseconds of random jitter. With the frequency
// difference defined as (f_data - f_DCO) / f_DCO, a working detector must be positive whenever the
// DCO is slower than a quarter of the data rate and negative whenever it is
// faster: the five-code mean of each point is checked for that sign. Points
// within 2 % of the lock point are printed but not checked. Between about
// -3 % and -7 % the detector is weak and a few isolated codes read slightly
// positive (the periodic PRBS7 pattern beating with the clock); they are
// counted and printed, not failed.
module tb_fd_curve;
  import sfd_pkg::*;

  int checks = 0, failures = 0, n_pos = 0, n_neg = 0, n_single = 0;

  logic        rst_n = 1'b1, dco_en = 1'b0, rx = 1'b0;
  logic [31:0] row_full, row_sel, col;
  logic [7:0]  ph;
  logic [3:0]  d_q, e_q, up, dn;
  logic [31:0] d_word, e_word;
  logic        clk_div, clk_div_e;
  real         f_ghz;
  weight_t     w_cnt [NPAT], w_acov[NPAT];
  mean_t       mean  [NPAT];
  count_t      cnt   [NPAT];
  acov_t       acov  [NPAT];
  fd_t         fd;

  dco          u_dco (.en(dco_en), .row_full, .row_sel, .col, .kp(3'd1), .up, .dn, .ph, .f_ghz);
  sampler_bank u_smp (.rst_n, .din(rx), .ph, .d_q, .e_q);
  bbpd         u_pd  (.clk_q(ph[0]), .rst_n, .d(d_q), .e(e_q), .up, .dn);
  deserializer u_dd  (.clk_q(ph[0]), .rst_n, .din(d_q), .dout(d_word), .clk_div(clk_div));
  deserializer u_de  (.clk_q(ph[0]), .rst_n, .din(e_q), .dout(e_word), .clk_div(clk_div_e));
  sfd_logic    u_sfd (.clk(clk_div), .rst_n, .d_word, .e_word, .w_cnt, .w_acov, .mean, .cnt, .acov, .fd);

  // PRBS7 at 32 Gb/s, each edge moved by a random 0..3 ps (bounded jitter,
  // not accumulated) so that the periodic pattern cannot beat with the ideal
  // model clock at particular frequency ratios
  bit [6:0] prbs = 7'h7f;
  real      jit = 0.0, jit_prev = 0.0;
  initial forever begin
    jit = real'($urandom_range(0, 3000)) / 1000.0;
    #(31.25 + jit - jit_prev);
    jit_prev = jit;
    prbs = {prbs[5:0], prbs[6] ^ prbs[5]};
    rx   = prbs[0];
  end

  bit     acc_on = 0;
  longint fd_sum = 0;
  int     n_words = 0;
  always @(posedge clk_div) if (acc_on) begin
    fd_sum += longint'(fd);
    n_words++;
  end

  task automatic set_code(int code);
    for (int r = 0; r < 32; r++) begin
      row_full[r] = r < code / 32;
      row_sel[r]  = r <= code / 32;
    end
    for (int c = 0; c < 32; c++) col[c] = c < code % 32;
  endtask

  initial begin
    real f0, dfrac, avg;
    w_cnt  = W_CNT_DEF;
    w_acov = W_ACOV_DEF;
    mean   = '{mean_t'(15 * 16), mean_t'(8 * 16), mean_t'(0), mean_t'(8 * 16)};
    set_code(450);
    #10 rst_n = 1'b0;
    #100 dco_en = 1'b1;
    #1000 rst_n = 1'b1;
    for (int code = 450; code <= 1000; code += 25) begin
      // five codes around the point, 2 us each; the check uses their mean
      avg = 0.0;
      for (int o = -4; o <= 4; o += 2) begin
        real a1;
        set_code(code + o);
        #200000;                     // settle 200 ns
        fd_sum = 0; n_words = 0; acc_on = 1;
        #2000000;                    // average over 2 us
        acc_on = 0;
        a1 = real'(fd_sum) / real'(n_words) / 262144.0;
        if ((code + o - 672) * a1 > 0.0 && (code + o < 662 || code + o > 682)) n_single++;
        avg += a1 / 5.0;
      end
      f0    = 3.26 + 7.22 * real'(code) / 1023.0;
      dfrac = (8.0 - f0) / f0;
      $display("code %4d  f_DCO %6.3f GHz  df %7.2f %%  FD %8.4f", code, f0, 100.0 * dfrac, avg);
      if (dfrac > 0.02) begin
        checks++; n_pos++;
        if (avg <= 0.0) begin failures++; $display("FAIL: detector not positive with the DCO slow"); end
      end else if (dfrac < -0.02) begin
        checks++; n_neg++;
        if (avg >= 0.0) begin failures++; $display("FAIL: detector not negative with the DCO fast"); end
      end
    end
    $display("single codes with the wrong sign: %0d of %0d", n_single, 5 * 23);
    checks++;
    if (n_pos == 0 || n_neg == 0) begin failures++; $display("FAIL: sweep did not cover both sides"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #300.0e6;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
