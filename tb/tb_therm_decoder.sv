`timescale 1ps / 1fs
// tb_therm_decoder: steps through all 1024 codes (and then random jumps).
// One cycle after a code is applied the number of DCR cells switched on,
// cell(r,c) = row_full[r] | (row_sel[r] & col[c]), must equal the code, and
// for consecutive codes the cells on must be a superset of the previous set.
module tb_therm_decoder;
  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 1;
  logic [9:0]  fcw = '0;
  logic [31:0] row_full, row_sel, col;

  therm_decoder dut (.clk, .rst_n, .fcw, .row_full, .row_sel, .col);

  always #5 clk = ~clk;

  bit cells[32][32], prev_cells[32][32];

  function automatic int count_cells();
    int n;
    n = 0;
    for (int r = 0; r < 32; r++)
      for (int c = 0; c < 32; c++) begin
        cells[r][c] = row_full[r] | (row_sel[r] & col[c]);
        if (cells[r][c]) n++;
      end
    return n;
  endfunction

  initial begin
    int n;
    #1 rst_n = 0; #10 rst_n = 1;
    prev_cells = '{default: '{default: 1'b0}};
    for (int code = 0; code < 1024 + 200; code++) begin
      @(negedge clk);
      fcw = (code < 1024) ? 10'(code) : 10'($urandom);
      @(posedge clk); #1;
      n = count_cells();
      checks++;
      if (n != int'(fcw)) begin
        failures++;
        if (failures < 10) $display("FAIL code=%0d cells=%0d", fcw, n);
      end
      if (code > 0 && code < 1024) begin
        checks++;
        for (int r = 0; r < 32; r++)
          for (int c = 0; c < 32; c++)
            if (prev_cells[r][c] && !cells[r][c]) begin
              failures++;
              $display("FAIL code=%0d switched cell %0d,%0d off", code, r, c);
            end
      end
      prev_cells = cells;
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
