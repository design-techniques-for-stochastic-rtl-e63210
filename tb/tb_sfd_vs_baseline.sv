`timescale 1ps / 1fs
// tb_sfd_vs_baseline: compares the autocovariance detector with a detector
// that uses the pattern counts alone, on the same top at its default
// parameters. Only the weight inputs differ:
//   proposed: counts (dn0, dn1, up2, up3) = (-1, -4, +1, +7),
//             autocovariances = (-5, -1, 0, 0)
//   baseline: counts = (-1, -1, +3, +3), autocovariances all 0.
// Input is the jittered 32 Gb/s PRBS7 of tb_cdr_impaired. Both detectors run
// the grid ki = 3..6, kp = 1..3 from the lowest and the highest code, 30 us per
// run, and every run is classified as in tb_gain_sweep (clean: locked within
// 10 us, FCW dither at most 4 codes, no bit errors). Checks:
//  * the proposed detector is clean from both ends at the nominal gains
//    ki = 4, kp = 1;
//  * at the same gains the baseline, started from the top, settles more than
//    2 % above the target code (false lock above the data rate);
//  * over the grid the proposed detector has at least as many clean runs as
//    the baseline (typically 6-7 against 4-5).
module tb_sfd_vs_baseline;
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

  localparam real LOCK_US    = 10.0;
  localparam int  DITH_OK    = 4;
  localparam int  TARGET_FCW = 672;   // 8.0 GHz on the model's tuning line

  int n_clean [2];

  task automatic run(input int det, input int kpv, input int kiv, input int start_code,
                     output bit clean, output int fcw_end);
    real target, t_lock, err;
    int  fmin, fmax, dith;
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
    dith    = fmax - fmin;
    fcw_end = int'(fcw);
    clean   = (t_lock <= LOCK_US) && (dith <= DITH_OK) && (bit_errs == 0) && (bits_checked > 1000);
    if (clean) n_clean[det]++;
    $display("%s kp=%0d ki=%0d start=%4d  lock=%5.1f us  fcw=%4d..%4d  errors=%5d  %s",
             det == 0 ? "proposed" : "baseline", kpv, kiv, start_code, t_lock, fmin, fmax,
             bit_errs, clean ? "clean" : "");
  endtask

  task automatic set_weights(input int det);
    if (det == 0) begin
      w_cnt  = W_CNT_DEF;
      w_acov = W_ACOV_DEF;
    end else begin
      w_cnt  = '{weight_t'(-1), weight_t'(-1), weight_t'(3), weight_t'(3)};
      w_acov = '{default: weight_t'(0)};
    end
  endtask

  initial begin
    bit c0, c1;
    int f0, f1;
    mean = '{mean_t'(15 * 16), mean_t'(8 * 16), mean_t'(0), mean_t'(8 * 16)};
    n_clean = '{0, 0};
    #10;
    for (int det = 0; det < 2; det++) begin
      set_weights(det);
      for (int k = 3; k <= 6; k++)
        for (int p = 1; p <= 3; p++) begin
          run(det, p, k, 0, c0, f0);
          run(det, p, k, 1023, c1, f1);
          if (k == 4 && p == 1) begin
            checks++;
            if (det == 0 && !(c0 && c1)) begin
              failures++; $display("FAIL: proposed detector not clean at ki=4 kp=1");
            end
            if (det == 1 && f1 <= TARGET_FCW + TARGET_FCW / 50) begin
              failures++; $display("FAIL: baseline did not stick above the target from the top");
            end
          end
        end
    end
    checks++;
    if (n_clean[0] < n_clean[1]) begin
      failures++; $display("FAIL: proposed detector has fewer clean runs than the baseline");
    end
    $display("clean runs of 24: proposed=%0d baseline=%0d", n_clean[0], n_clean[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    #(2.0e9);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
