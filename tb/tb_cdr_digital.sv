`timescale 1ps / 1fs
// tb_cdr_digital: random data/edge words through the whole digital block
// with the default weights. A reference chain (classification, counts,
// autocovariance, weighted sum, clipped accumulator) predicts the FCW, which
// must appear four clock edges after its word (after one pipeline-fill
// sample following reset); the thermometer code one edge
// later must switch on exactly FCW cells. Words biased towards no-transition
// patterns drive the FCW down, words biased towards late patterns drive it up.
module tb_cdr_digital;
  import sfd_pkg::*;
  import sfd_ref_pkg::*;
  localparam int FRAC = 24;
  int checks = 0, failures = 0, n_rise = 0, n_fall = 0;
  logic        clk = 0, rst_n = 1;
  logic [31:0] d_word = '0, e_word = '0;
  weight_t     w_cnt [NPAT], w_acov[NPAT];
  mean_t       mean  [NPAT];
  logic [3:0]  ki = 4'd4;
  logic [9:0]  init_fcw = 10'd512, fcw;
  fd_t         fd;
  logic        sat_hi, sat_lo;
  logic [31:0] row_full, row_sel, col;

  cdr_digital dut (.clk, .rst_n, .d_word, .e_word, .w_cnt, .w_acov, .mean, .ki, .init_fcw,
                   .fd, .fcw, .sat_hi, .sat_lo, .row_full, .row_sel, .col);

  always #5 clk = ~clk;

  int fcw_ref [$];

  function automatic int cells_on();
    int n;
    n = 0;
    for (int r = 0; r < 32; r++)
      for (int c = 0; c < 32; c++)
        if (row_full[r] | (row_sel[r] & col[c])) n++;
    return n;
  endfunction

  initial begin
    cnt4_t  c, cp;
    bit     prev;
    longint acc, top;
    int     wi[4], wai[4], mi[4];
    w_cnt = W_CNT_DEF; w_acov = W_ACOV_DEF;
    mean  = '{mean_t'(240), mean_t'(128), mean_t'(0), mean_t'(128)};
    for (int p = 0; p < 4; p++) begin wi[p] = W_CNT_DEF[p]; wai[p] = W_ACOV_DEF[p]; mi[p] = int'(mean[p]); end
    top = (longint'(1) << (10 + FRAC)) - 1;
    #1 rst_n = 0; #16 rst_n = 1;   // release between a rising and a falling edge
    acc = longint'(init_fcw) << FRAC;
    // pipeline fill: the autocovariance registers first hold 0*0 - mean^2,
    // so one sample of -sum(wa*mean^2) reaches the accumulator before word 0
    for (int p = 0; p < 4; p++) acc -= (longint'(wai[p]) * mi[p] * mi[p]) <<< ki;
    cp = '{0, 0, 0, 0};
    prev = 0;
    for (int n = 0; n < 1500; n++) begin
      @(negedge clk);
      if (n >= 4) begin
        checks++;
        if (int'(fcw) != fcw_ref[n - 4]) begin
          failures++;
          if (failures < 10) $display("FAIL word %0d fcw=%0d exp=%0d", n - 4, fcw, fcw_ref[n - 4]);
        end
        checks++;
        if (cells_on() != fcw_ref[n - 5 < 0 ? 0 : n - 5] && n >= 5) begin
          failures++;
          if (failures < 10) $display("FAIL thermometer %0d vs %0d", cells_on(), fcw_ref[n - 5]);
        end
        if (n >= 5 && fcw_ref[n - 4] > fcw_ref[n - 5]) n_rise++;
        if (n >= 5 && fcw_ref[n - 4] < fcw_ref[n - 5]) n_fall++;
      end
      if (n < 500) begin                     // mostly no transitions: slow down
        d_word = $urandom & $urandom & $urandom;
        d_word = d_word | (d_word << 1);
        e_word = d_word;
      end else if (n < 1000) begin           // transitions sampled late: speed up
        d_word = 32'h3333_3333 ^ $urandom;
        e_word = d_word;
      end else begin
        d_word = $urandom; e_word = $urandom;
      end
      c = count_word(d_word, e_word, prev);
      acc += fd_value(c, cp, wi, wai, mi) <<< ki;
      if (acc > top) acc = top;
      if (acc < 0) acc = 0;
      fcw_ref.push_back(int'(acc >> FRAC));
      cp = c;
      prev = d_word[31];
    end
    checks++; if (n_rise == 0 || n_fall == 0) begin failures++; $display("FAIL: fcw never moved both ways"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
