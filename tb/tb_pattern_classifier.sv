`timescale 1ps / 1fs
// tb_pattern_classifier: random and directed data/edge words; every triple's
// class is compared with the 3-bit pattern-number table of sfd_ref_pkg, and
// the four outputs must be one-hot per bit position.
module tb_pattern_classifier;
  import sfd_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] d, e, dn0, dn1, up2, up3;
  logic        prev;

  pattern_classifier dut (.d, .e, .d_prev_msb(prev), .dn0, .dn1, .up2, .up3);

  task automatic check_word();
    bit a;
    int cls;
    a = prev;
    for (int k = 0; k < 32; k++) begin
      cls = pat_class(a, e[k], d[k]);
      checks++;
      if ({up3[k], up2[k], dn1[k], dn0[k]} != 4'(1 << cls)) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d d=%h e=%h prev=%b class=%0d got %b", k, d, e, prev, cls,
                                    {up3[k], up2[k], dn1[k], dn0[k]});
      end
      a = d[k];
    end
  endtask

  initial begin
    // directed: all patterns at bit 0 through prev
    for (int n = 0; n < 8; n++) begin
      prev = n[2]; e = {31'h0, n[1]}; d = {31'h0, n[0]};
      #1 check_word();
    end
    d = 32'h5555_5555; e = 32'hAAAA_AAAA; prev = 1'b0; #1 check_word();
    d = 32'hFFFF_0000; e = 32'hFFFF_0000; prev = 1'b1; #1 check_word();
    for (int i = 0; i < 300; i++) begin
      d = $urandom; e = $urandom; prev = 1'($urandom);
      #1 check_word();
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
