`timescale 1ps / 1fs
// tb_dlf: drives random frequency-error samples through the integral path
// with several gain exponents. A reference accumulator (init_fcw << FRAC
// after reset, + fd << ki per cycle, clipped to [0, 2^(10+FRAC)-1]) predicts
// the FCW one cycle after each sample; both clipping limits are exercised.
module tb_dlf;
  import sfd_pkg::*;
  localparam int FRAC = 24;
  int checks = 0, failures = 0, n_hi = 0, n_lo = 0;
  logic       clk = 0, rst_n = 1;
  fd_t        fd = '0;
  logic [3:0] ki = 4'd4;
  logic [9:0] init_fcw = 10'd300, fcw;
  logic       sat_hi, sat_lo;

  dlf dut (.clk, .rst_n, .fd, .ki, .init_fcw, .fcw, .sat_hi, .sat_lo);

  always #5 clk = ~clk;

  initial begin
    longint acc, top;
    top = (longint'(1) << (10 + FRAC)) - 1;
    #1 rst_n = 0; #10;
    checks++;
    if (fcw != init_fcw) begin failures++; $display("FAIL reset load fcw=%0d", fcw); end
    rst_n = 1;
    acc = longint'(init_fcw) << FRAC;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (i < 1000)      fd = fd_t'($urandom_range(0, 1 << 20)) - fd_t'(1 << 19);
      else if (i < 1500) fd = fd_t'($urandom_range(0, 1 << 22));           // drive to the top
      else if (i < 2500) fd = -fd_t'($urandom_range(0, 1 << 22));          // then to the bottom
      else               fd = fd_t'($urandom_range(0, 1 << 24)) - fd_t'(1 << 23);
      ki = 4'($urandom_range(0, 9));
      acc = acc + (longint'(fd) <<< ki);
      if (acc > top) acc = top;
      if (acc < 0) acc = 0;
      @(posedge clk); #1;
      checks++;
      if (longint'(fcw) != (acc >> FRAC)) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d fcw=%0d exp=%0d", i, fcw, acc >> FRAC);
      end
      if (sat_hi) n_hi++;
      if (sat_lo) n_lo++;
    end
    checks++; if (n_hi == 0) begin failures++; $display("FAIL: top clip never reached"); end
    checks++; if (n_lo == 0) begin failures++; $display("FAIL: bottom clip never reached"); end
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
