`timescale 1ps / 1fs
// sampler_bank: the eight front-end samplers of the quarter-rate receiver
// and their retiming to the quarter-rate clock.
//
// The DCO provides eight clock phases ph[0..7], 45 degrees apart. Edge
// samplers use the even phases and data samplers the odd phases, so edge
// sample k (phase 2k) falls between data samples k-1 and k. Each sampler is
// a StrongArm latch in the real circuit; here each is a flip-flop that
// decides the (already equalized) input level at the rising edge of its
// phase. All eight decisions of one clock period are handed over together
// at the next rising edge of ph[0] as d_q[3:0] and e_q[3:0] (bit 0 first).
// Eight samplers and eight phases follow the design description; which
// phases go to data and which to edge, and the retiming point, are own
// choices.
module sampler_bank (
  input  logic       rst_n,
  input  logic       din,     // equalized serial input
  input  logic [7:0] ph,      // eight DCO clock phases
  output logic [3:0] d_q,     // data samples, retimed to ph[0]
  output logic [3:0] e_q      // edge samples, retimed to ph[0]
);

  logic [7:0] s;

  for (genvar k = 0; k < 8; k++) begin : g_smp
    always_ff @(posedge ph[k] or negedge rst_n) begin
      if (!rst_n) s[k] <= 1'b0;
      else        s[k] <= din;
    end
  end

  always_ff @(posedge ph[0] or negedge rst_n) begin
    if (!rst_n) begin
      d_q <= '0;
      e_q <= '0;
    end else begin
      d_q <= {s[7], s[5], s[3], s[1]};
      e_q <= {s[6], s[4], s[2], s[0]};
    end
  end

endmodule
