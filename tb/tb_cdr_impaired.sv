`timescale 1ps / 1fs
// tb_cdr_impaired: closed-loop test of the referenceless CDR at its default
// parameters with an impaired 32 Gb/s PRBS7 input. The end-to-end test
// (tb_refless_cdr) uses ideal edges; here every data transition is moved by
//  * data-dependent jitter, as a band-limited channel leaves it after the
//    equalizer: a transition that ends a run of two or more equal bits comes
//    DDJ_PS/2 late, one that ends a single-bit run comes DDJ_PS/2 early;
//  * random jitter, approximately Gaussian (sum of four uniform draws) with
//    RJ_RMS_PS rms.
// The DCO starts from the lowest and from the highest code. Each run checks
// that the FCW-implied frequency stays within 1 % of the quarter rate after
// LOCK_BUDGET_US, that the recovered clock averages within 0.5 % of it, and
// that the recovered words obey the PRBS7 recurrence without error. Both
// jitter components are counted, and a failure is counted if either was never
// applied.
module tb_cdr_impaired;
  import sfd_pkg::*;

  localparam real RATE_GBPS      = 32.0;
  localparam real DDJ_PS         = 2.0;    // peak-to-peak data-dependent jitter
  localparam real RJ_RMS_PS      = 1.0;    // rms random jitter
  localparam real LOCK_BUDGET_US = 9.0;
  localparam real ACQ_US         = 15.0;   // frequency and phase settling
  localparam real MEAS_US        = 3.0;

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
  int       rec_edges = 0;
  longint   bit_errs = 0, bits_checked = 0;
  bit [6:0] hist;
  int       hist_fill = 0;

  always @(posedge clk_rec) if (meas_on) rec_edges++;

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

  task automatic run(input int start_code);
    real target, f_avg, t_lock, err;
    dco_en   = 1'b0;
    rst_n    = 1'b0;
    init_fcw = FCW_W'(start_code);
    target   = RATE_GBPS / 4.0;
    #1000;
    dco_en = 1'b1;
    #1000;
    rst_n  = 1'b1;
    t_lock = 0.0;
    for (int s = 0; s < int'(ACQ_US * 10.0); s++) begin
      #100000;  // 100 ns
      err = (fcw_ghz(int'(fcw)) - target) / target;
      if (err > 0.01 || err < -0.01) t_lock = real'(s + 1) * 0.1;
    end
    rec_edges = 0; bit_errs = 0; bits_checked = 0; hist_fill = 0;
    meas_on = 1;
    #(MEAS_US * 1.0e6);
    meas_on = 0;
    f_avg = real'(rec_edges) / (MEAS_US * 1000.0);
    $display("impaired %0.1f Gb/s start=%0d: fcw=%0d f_avg=%0.4f GHz (target %0.4f) lock=%0.1f us bits=%0d errors=%0d",
             RATE_GBPS, start_code, fcw, f_avg, target, t_lock, bits_checked, bit_errs);
    checks++;
    if ((f_avg - target) / target > 0.005 || (f_avg - target) / target < -0.005) begin
      failures++; $display("FAIL: average recovered clock off target");
    end
    checks++;
    if (t_lock > LOCK_BUDGET_US) begin
      failures++; $display("FAIL: acquisition took %0.1f us", t_lock);
    end
    checks++;
    if (bits_checked < 1000 || bit_errs != 0) begin
      failures++; $display("FAIL: recovered data errors");
    end
  endtask

  initial begin
    w_cnt  = W_CNT_DEF;
    w_acov = W_ACOV_DEF;
    // same mean setting as the end-to-end test (Q6.4): 15.0, 8.0, 0, 8.0
    mean   = '{mean_t'(15 * 16), mean_t'(8 * 16), mean_t'(0), mean_t'(8 * 16)};
    #10;
    run(0);
    run(1023);
    checks++; if (n_ddj_late == 0 || n_ddj_early == 0) begin failures++; $display("FAIL: DDJ not applied"); end
    checks++; if (n_rj == 0) begin failures++; $display("FAIL: RJ not applied"); end
    $display("jitter events: ddj_late=%0d ddj_early=%0d rj=%0d", n_ddj_late, n_ddj_early, n_rj);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    #(80.0e6);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
