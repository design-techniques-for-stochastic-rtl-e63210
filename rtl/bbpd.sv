`timescale 1ps / 1fs
// bbpd: quarter-rate Alexander (bang-bang) phase detector of the
// direct-proportional path.
//
// Every quarter-rate cycle brings four data samples d[0..3] and four edge
// samples e[0..3], e[k] taken between d[k-1] and d[k] (d[-1] is d[3] of the
// previous cycle, kept in a flip-flop). For each of the four triples:
//   data transition and e[k] == d[k-1]  -> dn[k] (clock early, slow down)
//   data transition and e[k] == d[k]    -> up[k] (clock late, speed up)
//   no transition                       -> neither
// The four up/dn pairs drive the DCO varactors directly. The design calls
// this an analog BBPD; here the same decision is logic, combinational from
// the retimed samples, so up/dn change right after the clk_q edge.
module bbpd #(
  parameter int unsigned N = 4
) (
  input  logic         clk_q,
  input  logic         rst_n,
  input  logic [N-1:0] d,      // data samples, d[0] first
  input  logic [N-1:0] e,      // edge samples, e[k] before d[k]
  output logic [N-1:0] up,
  output logic [N-1:0] dn
);

  logic         d_last;
  logic [N-1:0] d_prev;

  always_ff @(posedge clk_q or negedge rst_n) begin
    if (!rst_n) d_last <= 1'b0;
    else        d_last <= d[N-1];
  end

  always_comb begin
    d_prev = {d[N-2:0], d_last};
    up     = (d_prev ^ d) & ~(e ^ d);
    dn     = (d_prev ^ d) & ~(e ^ d_prev);
  end

endmodule
