`timescale 1ps / 1fs
// tb_refless_cdr: end-to-end test of the referenceless CDR at its default
// parameters. A PRBS7 source (x[n] = x[n-7] ^ x[n-6]) drives the equalized
// input at several data rates; the DCO starts from the bottom or the top of
// its code range with no reference clock. For every run the test checks that
//  * the integral path settles with the DCO at one quarter of the data rate
//    (average of the recovered clock within 0.5 %),
//  * frequency acquisition ends within LOCK_BUDGET_US (the FCW-implied
//    frequency stays within 1 % of the target from then on),
//  * the recovered 32-bit words obey the PRBS7 recurrence (no bit errors).
// It also counts the mechanisms: up-tracking, down-tracking, BBPD up and dn
// decisions, non-zero autocovariance terms, and fails if one never happened.
module tb_refless_cdr;
  import sfd_pkg::*;

  localparam real LOCK_BUDGET_US = 9.0;   // see README: the chip measured < 7 us
  localparam real ACQ_US         = 10.0;   // acquisition window per run
  localparam real MEAS_US        = 3.0;    // measurement window per run

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

  // ---------------- PRBS7 transmitter ----------------
  real      ui_ps = 31.25;
  bit [6:0] prbs  = 7'h7f;
  initial forever begin
    #(ui_ps);
    prbs = {prbs[5:0], prbs[6] ^ prbs[5]};
    rx   = prbs[0];
  end

  // ---------------- monitors ----------------
  bit       meas_on = 0;
  int       rec_edges = 0;
  longint   bit_errs = 0, bits_checked = 0;
  bit [6:0] hist;
  int       hist_fill = 0;
  int       n_up = 0, n_dn = 0, n_acov = 0, n_uptrack = 0, n_dntrack = 0;

  always @(posedge clk_rec) begin
    if (meas_on) rec_edges++;
    n_up += $countones(pd_up);
    n_dn += $countones(pd_dn);
  end

  always @(posedge clk_div) begin
    if (dut.u_dig.u_sfd.acov[PAT_DN0] != 0) n_acov++;
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

  task automatic run(input real rate_gbps, input int start_code);
    real    target, f_avg, t_lock, err;
    int     fcw_first, fcw_min, fcw_max;
    dco_en   = 1'b0;
    rst_n    = 1'b0;
    init_fcw = FCW_W'(start_code);
    ui_ps    = 1000.0 / rate_gbps;
    target   = rate_gbps / 4.0;
    #1000;
    dco_en = 1'b1;
    #1000;
    rst_n  = 1'b1;
    t_lock = 0.0;
    fcw_first = -1; fcw_min = 1023; fcw_max = 0;
    for (int s = 0; s < int'(ACQ_US * 10.0); s++) begin
      #100000;  // 100 ns
      if (fcw_first < 0) fcw_first = int'(fcw);
      if (int'(fcw) < fcw_min) fcw_min = int'(fcw);
      if (int'(fcw) > fcw_max) fcw_max = int'(fcw);
      err = (fcw_ghz(int'(fcw)) - target) / target;
      if (err > 0.01 || err < -0.01) t_lock = real'(s + 1) * 0.1;
    end
    if (fcw_max > start_code + 50) n_uptrack++;
    if (fcw_min < start_code - 50) n_dntrack++;
    // measurement window
    rec_edges = 0; bit_errs = 0; bits_checked = 0; hist_fill = 0;
    meas_on = 1;
    #(MEAS_US * 1.0e6);
    meas_on = 0;
    f_avg = real'(rec_edges) / (MEAS_US * 1000.0);
    $display("run %0.1f Gb/s start=%0d: fcw=%0d f_avg=%0.4f GHz (target %0.4f) lock=%0.1f us bits=%0d errors=%0d",
             rate_gbps, start_code, fcw, f_avg, target, t_lock, bits_checked, bit_errs);
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
    // mean counts per word (Q6.4): dn0 15.0, dn1 8.0, up2 0, up3 8.0. The
    // dn1/up3/up2 values are the lock-point statistics of random data; the
    // dn0 value 15.0 (instead of 16) removes a false lock near +9 %.
    mean   = '{mean_t'(15 * 16), mean_t'(8 * 16), mean_t'(0), mean_t'(8 * 16)};
    #10;
    run(32.0, 0);      // up-tracking from the lowest code
    run(32.0, 1023);   // down-tracking from the highest code
    run(28.0, 0);
    run(20.0, 1023);
    run(14.0, 0);
    // mechanisms
    checks++; if (n_uptrack == 0) begin failures++; $display("FAIL: no up-tracking"); end
    checks++; if (n_dntrack == 0) begin failures++; $display("FAIL: no down-tracking"); end
    checks++; if (n_up == 0)      begin failures++; $display("FAIL: BBPD never said up"); end
    checks++; if (n_dn == 0)      begin failures++; $display("FAIL: BBPD never said dn"); end
    checks++; if (n_acov == 0)    begin failures++; $display("FAIL: autocovariance never non-zero"); end
    $display("mechanisms: uptrack=%0d dntrack=%0d bbpd_up=%0d bbpd_dn=%0d acov_nonzero=%0d",
             n_uptrack, n_dntrack, n_up, n_dn, n_acov);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    #(100.0e6);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
