`timescale 1ps / 1fs
// tb_deserializer: a numbered stream of 4-bit samples goes in; every word
// on dout must hold eight consecutive samples, the earliest in bits 3:0,
// and must be stable at each rising edge of clk_div, which has to come every
// 8 clk_q cycles (4:32 ratio).
module tb_deserializer;
  int checks = 0, failures = 0;
  logic        clk_q = 0, rst_n = 1, clk_div;
  logic [3:0]  din = '0;
  logic [31:0] dout;

  deserializer dut (.clk_q, .rst_n, .din, .dout, .clk_div);

  always #5 clk_q = ~clk_q;

  bit [3:0] sent [$];
  int       nib = 0, word_idx = 0, qcyc = 0, last_div = -1;

  always @(posedge clk_q) qcyc++;

  always @(negedge clk_q) if (rst_n) begin
    din = 4'($urandom);
    sent.push_back(din);
  end

  always @(posedge clk_div) begin
    bit [31:0] expw;
    // the first rising edge comes before the first word is complete
    if (word_idx > 0) begin
      for (int k = 0; k < 8; k++) expw[4*k +: 4] = sent[8 * (word_idx - 1) + k];
      checks++;
      if (dout != expw) begin
        failures++;
        if (failures < 10) $display("FAIL word %0d dout=%h exp=%h", word_idx, dout, expw);
      end
    end
    if (last_div >= 0) begin
      checks++;
      if (qcyc - last_div != 8) begin failures++; $display("FAIL clk_div period %0d", qcyc - last_div); end
    end
    last_div = qcyc;
    word_idx++;
  end

  initial begin
    #1 rst_n = 0;
    #11 rst_n = 1;                // released between a falling and a rising edge
    sent.push_back(din);          // first sample, taken at the next rising edge
    #20000;
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
