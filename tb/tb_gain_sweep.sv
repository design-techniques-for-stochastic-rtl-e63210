`timescale 1ps / 1fs
// tb_gain_sweep: loop-gain sweep of the referenceless CDR at 32 Gb/s. The top
// runs at its default parameters; only the kp and ki inputs change. For every
// ki from 2 to 8 and kp from 1 to 4 it starts the DCO once from the lowest and
// once from the highest code, with the jittered PRBS7 input of
// tb_cdr_impaired (2 ps pk-pk data-dependent plus 1 ps rms random jitter). Each
// run lasts 30 us: lock time is the last moment the FCW-implied frequency was
// more than 1 % off the quarter rate, dither is the FCW range over the last
// 5 us, and the recovered data is checked against PRBS7 for 2 us after that.
// A run is clean when it locks within 10 us, dithers by at most 4 codes and
// has no bit errors. The test checks the behaviour of the integral gain that
// the design is meant to have:
//  * ki = 4, 5 and 6 each have a kp for which both starts are clean;
//  * at kp = 1 the dither grows with every step of ki from 4 to 8;
//  * from ki = 7 no kp gives a dither below 10 codes (no clean lock).
// The whole table is printed. Runs that settle away from the target (false
// lock) are counted and reported but not failed: with this model they occur
// for ki = 2 and 3 and for large kp at ki = 4 and 5, see README.
module tb_gain_sweep;
  import sfd_pkg::*;

  localparam real RATE_GBPS      = 32.0;
  localparam real DDJ_PS         = 2.0;    // peak-to-peak data-dependent jitter
  localparam real RJ_RMS_PS      = 1.0;    // rms random jitter

  int checks = 0, failures = 0;

  logic             rst_n = 1'b1, dco_en = 1'b0, rx = 1'b0;
  logic [2:0]       kp = 3'd1;
  logic [3:0]       ki = 4'd4;
  logic [FCW_W-1:0] init_fcw = '0;
  weight_t          w_cnt [NPAT];
  weight_t          w_acov[NPAT];
  mean_t            mean  [NPAT];
  logic             clk_rec, clk_div;
  logic [31:0]      data_word;
  logic [FCW_W-1:0] fcw;
  logic [3:0]       pd_up, pd_dn;

  refless_cdr dut (
    .rst_n, .dco_en, .rx_in(rx), .kp, .ki, .init_fcw, .w_cnt, .w_acov, .mean,
    .clk_rec, .clk_div, .data_word, .fcw, .pd_up, .pd_dn
  );

  // ---------------- impaired PRBS7 transmitter ----------------
  // Bit n nominally starts at n*UI. Its actual start is n*UI + j[n]; the wait
  // between two starts is therefore UI + j[n+1] - j[n]. A bit that repeats
  // its predecessor has no edge, so its offset only shapes the next wait.
  localparam real UI_PS = 1000.0 / RATE_GBPS;
  bit [6:0] prbs = 7'h7f;
  int       run_len = 1;
  real      j_cur = 0.0, j_next;
  int       n_ddj_late = 0, n_ddj_early = 0, n_rj = 0;

  function automatic real rj_sample();
    real s = 0.0;
    for (int i = 0; i < 4; i++) s += real'($urandom_range(0, 1_000_000)) / 1.0e6 - 0.5;
    // four U(-0.5,0.5) draws have variance 1/3
    return s * RJ_RMS_PS * 1.7320508;
  endfunction

  initial forever begin
    bit nb;
    nb = prbs[6] ^ prbs[5];
    if (nb != prbs[0]) begin
      j_next = rj_sample();
      if (j_next != 0.0) n_rj++;
      if (run_len >= 2) begin j_next += DDJ_PS / 2.0; n_ddj_late++;  end
      else              begin j_next -= DDJ_PS / 2.0; n_ddj_early++; end
      run_len = 1;
    end else begin
      j_next  = j_cur;
      run_len++;
    end
    #(UI_PS + j_next - j_cur);
    j_cur = j_next;
    prbs  = {prbs[5:0], nb};
    rx    = nb;
  end

  // ---------------- monitors ----------------
  bit       meas_on = 0;
  longint   bit_errs = 0, bits_checked = 0;
  bit [6:0] hist;
  int       hist_fill = 0;


  always @(posedge clk_div) begin
    if (meas_on) begin
      for (int i = 0; i < 32; i++) begin
        if (hist_fill >= 7) begin
          bits_checked++;
          if (data_word[i] != (hist[6] ^ hist[5])) bit_errs++;
        end
        hist = {hist[5:0], data_word[i]};
        hist_fill++;
      end
    end
  end

  function automatic real fcw_ghz(int code);
    return 3.26 + (10.48 - 3.26) * real'(code) / 1023.0;
  endfunction

  localparam real LOCK_US = 10.0;
  localparam int  DITH_OK = 4;
  int lock_ok [2:8][1:4];
  int dith0   [2:8][1:4];
  int n_clean = 0, n_false = 0, n_dither = 0;

  task automatic run(input int kpv, input int kiv, input int start_code,
                     output bit clean, output int dith);
    real target, t_lock, err;
    int  fmin, fmax;
    kp = 3'(kpv); ki = 4'(kiv);
    dco_en = 1'b0; rst_n = 1'b0; init_fcw = FCW_W'(start_code);
    target = RATE_GBPS / 4.0;
    #1000; dco_en = 1'b1; #1000; rst_n = 1'b1;
    t_lock = 0.0; fmin = 1023; fmax = 0;
    for (int s = 0; s < 300; s++) begin
      #100000;  // 100 ns
      err = (fcw_ghz(int'(fcw)) - target) / target;
      if (err > 0.01 || err < -0.01) t_lock = real'(s + 1) * 0.1;
      if (s >= 250) begin
        if (int'(fcw) < fmin) fmin = int'(fcw);
        if (int'(fcw) > fmax) fmax = int'(fcw);
      end
    end
    bit_errs = 0; bits_checked = 0; hist_fill = 0;
    meas_on = 1; #(2.0e6); meas_on = 0;
    dith  = fmax - fmin;
    clean = (t_lock <= LOCK_US) && (dith <= DITH_OK) && (bit_errs == 0) && (bits_checked > 1000);
    if (clean) n_clean++;
    else if (dith <= 2 && t_lock > 25.0) n_false++;
    else n_dither++;
    $display("kp=%0d ki=%0d start=%4d  lock=%5.1f us  fcw=%4d..%4d  dither=%3d  errors=%5d  %s",
             kpv, kiv, start_code, t_lock, fmin, fmax, dith, bit_errs,
             clean ? "clean" : (dith <= 2 && t_lock > 25.0) ? "false lock" : "not settled");
  endtask

  initial begin
    bit c0, c1;
    int d0, d1;
    w_cnt  = W_CNT_DEF;
    w_acov = W_ACOV_DEF;
    mean   = '{mean_t'(15 * 16), mean_t'(8 * 16), mean_t'(0), mean_t'(8 * 16)};
    #10;
    for (int k = 2; k <= 8; k++)
      for (int p = 1; p <= 4; p++) begin
        run(p, k, 0, c0, d0);
        run(p, k, 1023, c1, d1);
        lock_ok[k][p] = int'(c0 && c1);
        dith0[k][p]   = d0 > d1 ? d0 : d1;
      end
    for (int k = 4; k <= 6; k++) begin
      automatic int any = 0;
      for (int p = 1; p <= 4; p++) any += lock_ok[k][p];
      checks++;
      if (any == 0) begin failures++; $display("FAIL: no kp gives a clean lock at ki=%0d", k); end
    end
    for (int k = 5; k <= 8; k++) begin
      checks++;
      if (dith0[k][1] <= dith0[k-1][1]) begin
        failures++; $display("FAIL: dither at kp=1 did not grow from ki=%0d to ki=%0d", k - 1, k);
      end
    end
    for (int k = 7; k <= 8; k++)
      for (int p = 1; p <= 4; p++) begin
        checks++;
        if (dith0[k][p] < 10) begin
          failures++; $display("FAIL: ki=%0d kp=%0d settled (dither %0d)", k, p, dith0[k][p]);
        end
      end
    checks++; if (n_clean == 0)  begin failures++; $display("FAIL: no clean run"); end
    checks++; if (n_dither == 0) begin failures++; $display("FAIL: no dithering run"); end
    $display("runs: clean=%0d false_lock=%0d not_settled=%0d", n_clean, n_false, n_dither);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    #(2.5e9);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
