`timescale 1ps / 1fs
// tb_autocov: feeds a random count sequence and a changing mean; one cycle
// after count c[n] is applied the output must be c[n]*c[n-1]*256 - mean^2
// (mean in Q6.4, so mean^2 carries 8 fractional bits). c[-1] is 0 after reset.
module tb_autocov;
  import sfd_pkg::*;
  int checks = 0, failures = 0;
  logic   clk = 0, rst_n = 1;
  count_t cnt;
  mean_t  mean;
  acov_t  acov;
  int     c_prev;

  autocov dut (.clk, .rst_n, .cnt, .mean, .acov);

  always #5 clk = ~clk;

  initial begin
    longint expv;
    cnt = '0; mean = '0;
    #1 rst_n = 0; #10 rst_n = 1;
    c_prev = 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      cnt  = count_t'($urandom_range(0, 32));
      if (i % 50 == 0) mean = mean_t'($urandom_range(0, 32 * 16));
      if (i == 7) begin cnt = 6'd32; mean = '0; end                 // largest positive
      if (i == 8) begin cnt = 6'd0;  mean = mean_t'(32 * 16); end   // largest negative
      expv = longint'(cnt) * c_prev * 256 - longint'(mean) * mean;
      @(posedge clk); #1;
      checks++;
      if (longint'(acov) != expv) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d c=%0d cp=%0d mean=%0d acov=%0d exp=%0d", i, cnt, c_prev, mean, acov, expv);
      end
      c_prev = int'(cnt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
