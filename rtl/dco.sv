`timescale 1ps / 1fs
// dco: behavioural model of the 8-phase ring digitally controlled
// oscillator (not synthesizable; it stands for an analog circuit).
//
// The real oscillator is a four-stage pseudo-differential inverter ring whose
// supply is lowered through a digitally controlled resistor (DCR) made of
// 1023 unit cells selected by a row/column thermometer code, plus varactor
// loads driven by the four up/dn outputs of the bang-bang phase detector
// (direct-proportional path), and level shifters back to full swing.
// This model keeps the interface and the control law:
//   code = number of DCR cells switched on (0..1023)
//   f    = F_MIN + (F_MAX - F_MIN) * code / 1023
//          + kp * KP_STEP * (number of up - number of dn)
// F_MIN = 3.26 GHz and F_MAX = 10.48 GHz are the measured tuning-range ends;
// the straight line between them, the proportional step per unit of kp and
// the random-free waveform are this model's own simplifications (the measured
// curve is concave). The eight outputs are 50% duty-cycle clocks, ph[k]
// delayed by k/8 of a period; the frequency is re-evaluated every 1/8 period.
// The oscillator runs while en is high and holds all phases low otherwise.
module dco #(
  parameter real         F_MIN_GHZ   = 3.26,  // code 0
  parameter real         F_MAX_GHZ   = 10.48, // code 1023
  parameter real         KP_STEP_GHZ = 0.01,  // per kp unit, per up/dn
  parameter int unsigned ROWS        = 32,
  parameter int unsigned COLS        = 32
) (
  input  logic            en,
  input  logic [ROWS-1:0] row_full,
  input  logic [ROWS-1:0] row_sel,
  input  logic [COLS-1:0] col,
  input  logic [2:0]      kp,        // direct-proportional gain
  input  logic [3:0]      up,
  input  logic [3:0]      dn,
  output logic [7:0]      ph,
  output real             f_ghz      // present frequency, for observation
);


  localparam int unsigned NCELL = ROWS * COLS - 1;

  int unsigned code;

  always_comb begin
    code = 0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        if (row_full[r] || (row_sel[r] && col[c])) code++;
  end

  always_comb begin
    f_ghz = F_MIN_GHZ + (F_MAX_GHZ - F_MIN_GHZ) * real'(code) / real'(NCELL)
          + real'(kp) * KP_STEP_GHZ
            * (real'($countones(up)) - real'($countones(dn)));
    if (f_ghz < 0.5) f_ghz = 0.5;
  end

  initial begin
    ph = '0;
    forever begin
      if (!en) begin
        ph = '0;
        @(posedge en);
      end
      for (int s = 0; s < 8; s++) begin
        ph[s]               = 1'b1;
        ph[(s + 4) % 8]     = 1'b0;
        #(1000.0 / (8.0 * f_ghz));
      end
    end
  end

endmodule
