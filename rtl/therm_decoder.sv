`timescale 1ps / 1fs
// therm_decoder: binary-to-thermometer decoder for the DCO's digitally
// controlled resistor (DCR).
//
// The DCR is an array of ROWS x COLS unit cells (32 x 32 for a 10-bit code).
// The upper bits of the FCW select the row, the lower bits the column:
//   row_full[r] = r <  fcw[9:5]   (rows that are completely on)
//   row_sel[r]  = r <= fcw[9:5]   (rows that may be on)
//   col[c]      = c <  fcw[4:0]
// and cell (r,c) is on when row_full[r] | (row_sel[r] & col[c]), so exactly
// fcw cells are on and one more code switches on exactly one more cell. That
// monotonic behaviour is why the design decodes the FCW into a thermometer
// code: a binary code change could glitch the DCO frequency. The row/column
// split and registered outputs are this design's choices.
// Timing: outputs are registered, one clock cycle after fcw.
module therm_decoder
  import sfd_pkg::*;
#(
  parameter int unsigned ROW_BITS = FCW_W / 2,
  parameter int unsigned COL_BITS = FCW_W - ROW_BITS
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [ROW_BITS+COL_BITS-1:0]  fcw,
  output logic [(1<<ROW_BITS)-1:0]      row_full,
  output logic [(1<<ROW_BITS)-1:0]      row_sel,
  output logic [(1<<COL_BITS)-1:0]      col
);

  localparam int unsigned ROWS = 1 << ROW_BITS;
  localparam int unsigned COLS = 1 << COL_BITS;

  logic [ROW_BITS-1:0] r_code;
  logic [COL_BITS-1:0] c_code;
  logic [ROWS-1:0]     row_full_d, row_sel_d;
  logic [COLS-1:0]     col_d;

  always_comb begin
    {r_code, c_code} = fcw;
    for (int r = 0; r < ROWS; r++) begin
      row_full_d[r] = (r < int'(r_code));
      row_sel_d[r]  = (r <= int'(r_code));
    end
    for (int c = 0; c < COLS; c++) col_d[c] = (c < int'(c_code));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_full <= '0;
      row_sel  <= ROWS'(1);
      col      <= '0;
    end else begin
      row_full <= row_full_d;
      row_sel  <= row_sel_d;
      col      <= col_d;
    end
  end

endmodule
