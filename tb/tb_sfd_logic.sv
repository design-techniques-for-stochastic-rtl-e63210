`timescale 1ps / 1fs
// tb_sfd_logic: random data/edge words with random weights and means. A
// reference classifies, counts, forms the lag-1 autocovariance and the
// weighted sum; the detector output for word n must appear exactly three
// clock edges after the word is applied (three register stages).
module tb_sfd_logic;
  import sfd_pkg::*;
  import sfd_ref_pkg::*;
  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 1;
  logic [31:0] d_word = '0, e_word = '0;
  weight_t     w_cnt [NPAT], w_acov[NPAT];
  mean_t       mean  [NPAT];
  count_t      cnt   [NPAT];
  acov_t       acov  [NPAT];
  fd_t         fd;

  sfd_logic dut (.clk, .rst_n, .d_word, .e_word, .w_cnt, .w_acov, .mean, .cnt, .acov, .fd);

  always #5 clk = ~clk;

  longint fd_ref [$];
  int     wi[4], wai[4], mi[4];

  task automatic set_cfg(bit dflt);
    for (int p = 0; p < 4; p++) begin
      if (dflt) begin
        w_cnt[p]  = W_CNT_DEF[p];
        w_acov[p] = W_ACOV_DEF[p];
      end else begin
        w_cnt[p]  = weight_t'($urandom_range(0, 31));
        w_acov[p] = weight_t'($urandom_range(0, 31));
      end
      mean[p] = mean_t'($urandom_range(0, 512));
      wi[p] = int'(w_cnt[p]); wai[p] = int'(w_acov[p]); mi[p] = int'(mean[p]);
    end
  endtask

  initial begin
    cnt4_t c, cp;
    bit    prev;
    set_cfg(1);
    #1 rst_n = 0; #16 rst_n = 1;   // release between a rising and a falling edge
    cp = '{0, 0, 0, 0};
    prev = 0;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      // check the word applied three cycles ago
      // words still in flight when the weights change at n = 300 are skipped
      if (n >= 3 && !(n - 3 >= 297 && n - 3 < 300)) begin
        checks++;
        if (longint'(fd) != fd_ref[n - 3]) begin
          failures++;
          if (failures < 10) $display("FAIL word %0d fd=%0d exp=%0d", n - 3, fd, fd_ref[n - 3]);
        end
      end
      if (n == 300) set_cfg(0);  // random weights and means from here on
      d_word = (n % 7 == 0) ? 32'h5555_5555 : $urandom;
      e_word = (n % 11 == 0) ? ~d_word : $urandom;
      c = count_word(d_word, e_word, prev);
      fd_ref.push_back(fd_value(c, cp, wi, wai, mi));
      cp = c;
      prev = d_word[31];
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
