`timescale 1ps / 1fs
// tb_dco: for a set of DCR codes and proportional settings the measured
// period of ph[0] (averaged over 64 periods) must match
//   f = 3.26 + 7.22 * code / 1023 + kp * 0.01 * (#up - #dn)  GHz
// within 0.1 %; the eight phases must rise in order, 1/8 period apart; and
// with en low all phases must stay low.
module tb_dco;
  int checks = 0, failures = 0;
  logic        en = 0;
  logic [31:0] row_full, row_sel, col;
  logic [2:0]  kp = '0;
  logic [3:0]  up = '0, dn = '0;
  logic [7:0]  ph;
  real         f_ghz;

  dco dut (.en, .row_full, .row_sel, .col, .kp, .up, .dn, .ph, .f_ghz);

  task automatic set_code(int code);
    for (int r = 0; r < 32; r++) begin
      row_full[r] = r < code / 32;
      row_sel[r]  = r <= code / 32;
    end
    for (int c = 0; c < 32; c++) col[c] = c < code % 32;
  endtask

  task automatic measure(int code, int kpv, bit [3:0] u, bit [3:0] d);
    realtime t0, t1, tk[8];
    real     f_exp, f_meas;
    set_code(code); kp = 3'(kpv); up = u; dn = d;
    f_exp = 3.26 + 7.22 * real'(code) / 1023.0
          + real'(kpv) * 0.01 * (real'($countones(u)) - real'($countones(d)));
    repeat (4) @(posedge ph[0]);
    t0 = $realtime;
    repeat (64) @(posedge ph[0]);
    t1 = $realtime;
    f_meas = 64.0 * 1000.0 / (t1 - t0);
    checks++;
    if ((f_meas - f_exp) / f_exp > 0.001 || (f_meas - f_exp) / f_exp < -0.001) begin
      failures++;
      $display("FAIL code=%0d kp=%0d f=%f exp=%f", code, kpv, f_meas, f_exp);
    end
    // phase order
    @(posedge ph[0]); tk[0] = $realtime;
    for (int k = 1; k < 8; k++) begin @(posedge ph[k]); tk[k] = $realtime; end
    checks++;
    for (int k = 1; k < 8; k++)
      if (tk[k] - tk[k-1] < 0.9 * 125.0 / f_exp || tk[k] - tk[k-1] > 1.1 * 125.0 / f_exp) begin
        failures++;
        $display("FAIL phase %0d spacing %f ps", k, tk[k] - tk[k-1]);
      end
  endtask

  initial begin
    set_code(0);
    #1000;
    checks++;
    if (ph != '0) begin failures++; $display("FAIL phases toggle while disabled"); end
    en = 1;
    measure(0, 0, 4'b0000, 4'b0000);
    measure(1023, 0, 4'b0000, 4'b0000);
    measure(672, 0, 4'b0000, 4'b0000);
    measure(672, 1, 4'b1111, 4'b0000);
    measure(672, 3, 4'b0000, 4'b1011);
    for (int i = 0; i < 6; i++) measure($urandom_range(0, 1023), $urandom_range(0, 7), 4'($urandom), 4'($urandom));
    en = 0;
    #2000;
    checks++;
    if (ph != '0) begin failures++; $display("FAIL phases not held low"); end
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
