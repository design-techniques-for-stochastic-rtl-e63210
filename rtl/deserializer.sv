`timescale 1ps / 1fs
// deserializer: 4:32 deserializer from the quarter-rate sampler outputs to
// the digital domain, plus the divided digital clock.
//
// Each rising edge of the quarter-rate clock clk_q delivers IN_W new bits
// (din[0] earliest). RATIO consecutive nibbles are collected, the first one
// landing in dout[IN_W-1:0], and the full word is transferred to dout once
// every RATIO cycles. clk_div is clk_q divided by RATIO (50% duty cycle for
// even RATIO); its rising edge comes RATIO/2 clk_q cycles after dout changes,
// so logic clocked by clk_div sees a settled word. The 4:32 ratio follows the
// design description; bit order, clock phase and the divider are own choices.
// Two instances (data and edge) share the same reset and stay in step.
module deserializer #(
  parameter int unsigned IN_W  = 4,
  parameter int unsigned RATIO = 8
) (
  input  logic                  clk_q,
  input  logic                  rst_n,
  input  logic [IN_W-1:0]       din,
  output logic [IN_W*RATIO-1:0] dout,
  output logic                  clk_div
);

  localparam int unsigned CW = (RATIO > 1) ? $clog2(RATIO) : 1;

  logic [CW-1:0]         cnt;
  logic [IN_W*(RATIO-1)-1:0] shreg;       // the RATIO-1 older nibbles
  logic [IN_W*RATIO-1:0]     shreg_next;

  // newest nibble enters at the top, so after RATIO shifts the first nibble
  // sits at the bottom
  assign shreg_next = {din, shreg};

  always_ff @(posedge clk_q or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      shreg   <= '0;
      dout    <= '0;
      clk_div <= 1'b0;
    end else begin
      shreg <= shreg_next[IN_W*RATIO-1:IN_W];
      cnt   <= (cnt == CW'(RATIO - 1)) ? '0 : cnt + 1'b1;
      if (cnt == CW'(RATIO - 1)) dout <= shreg_next;
      // high for the second half of the count: rises RATIO/2 cycles after dout
      clk_div <= (cnt >= CW'(RATIO/2 - 1)) && (cnt != CW'(RATIO - 1));
    end
  end

endmodule
