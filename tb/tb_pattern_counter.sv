`timescale 1ps / 1fs
// tb_pattern_counter: the count must equal the number of set bits, found
// here by a bit-serial loop, for the extremes and for random vectors.
module tb_pattern_counter;
  import sfd_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] vec;
  count_t      cnt;

  pattern_counter dut (.vec, .cnt);

  task automatic check();
    int n;
    n = 0;
    for (int k = 0; k < 32; k++) if (vec[k]) n++;
    checks++;
    if (int'(cnt) != n) begin
      failures++;
      $display("FAIL vec=%h cnt=%0d expected %0d", vec, cnt, n);
    end
  endtask

  initial begin
    vec = '0;           #1 check();
    vec = '1;           #1 check();
    vec = 32'h8000_0001; #1 check();
    for (int i = 0; i < 500; i++) begin
      vec = $urandom & $urandom;  // varied densities
      if (i % 3 == 0) vec = $urandom | $urandom;
      #1 check();
    end
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
