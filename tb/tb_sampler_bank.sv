`timescale 1ps / 1fs
// tb_sampler_bank: the testbench generates the eight clock phases itself
// (period 80, phase k rising at 10*k) and changes the input between phase
// edges, so each sampler sees a known value. After the next rising edge of
// ph[0] the retimed outputs must be d_q = samples of phases 1,3,5,7 and
// e_q = samples of phases 0,2,4,6 of the previous period.
module tb_sampler_bank;
  int checks = 0, failures = 0;
  logic       rst_n = 1, din = 0;
  logic [7:0] ph = '0;
  logic [3:0] d_q, e_q;

  sampler_bank dut (.rst_n, .din, .ph, .d_q, .e_q);

  initial begin
    bit [7:0] v, v_prev;
    #1 rst_n = 0; #2 rst_n = 1;
    v_prev = '0;
    for (int cyc = 0; cyc < 300; cyc++) begin
      v = 8'($urandom);
      for (int s = 0; s < 8; s++) begin
        din = v[s];
        #5;
        ph[s] = 1'b1;
        ph[(s + 4) % 8] = 1'b0;
        #1;
        if (s == 0 && cyc > 0) begin
          checks++;
          if (d_q != {v_prev[7], v_prev[5], v_prev[3], v_prev[1]} ||
              e_q != {v_prev[6], v_prev[4], v_prev[2], v_prev[0]}) begin
            failures++;
            if (failures < 10) $display("FAIL cyc %0d d_q=%b e_q=%b prev=%b", cyc, d_q, e_q, v_prev);
          end
        end
        #4;
      end
      v_prev = v;
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
