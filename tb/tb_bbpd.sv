`timescale 1ps / 1fs
// tb_bbpd: random quarter-rate data/edge samples. For each of the four
// triples (d[k-1], e[k], d[k]), with d[-1] the last data bit of the previous
// cycle, the reference decides: transition and e == d[k] -> up (late),
// transition and e == d[k-1] -> dn (early), no transition -> neither.
module tb_bbpd;
  int checks = 0, failures = 0, n_up = 0, n_dn = 0;
  logic       clk_q = 0, rst_n = 1;
  logic [3:0] d = '0, e = '0, up, dn;

  bbpd dut (.clk_q, .rst_n, .d, .e, .up, .dn);

  always #5 clk_q = ~clk_q;

  initial begin
    bit       last;
    bit [3:0] eu, ed;
    bit       a;
    #1 rst_n = 0; #2 rst_n = 1;
    last = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk_q);
      d = 4'($urandom); e = 4'($urandom);
      #1;
      a = last;
      for (int k = 0; k < 4; k++) begin
        eu[k] = (a != d[k]) && (e[k] == d[k]);
        ed[k] = (a != d[k]) && (e[k] == a);
        a = d[k];
      end
      checks++;
      if (up != eu || dn != ed) begin
        failures++;
        if (failures < 10) $display("FAIL d=%b e=%b last=%b up=%b dn=%b exp %b %b", d, e, last, up, dn, eu, ed);
      end
      n_up += $countones(up);
      n_dn += $countones(dn);
      last = d[3];
    end
    checks++; if (n_up == 0 || n_dn == 0) failures++;
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
