`timescale 1ps / 1fs
// dlf: digital loop filter of the integral (frequency) path.
//
// Integrates the SFD output with a programmable power-of-two gain, 2^ki
// (the integral gain is set in exponential steps), and returns the integer
// part of the accumulator as the 10-bit DCO frequency control word (FCW).
// The accumulator holds FCW_W integer bits and FRAC fractional bits and
// saturates at code 0 and at the top code, so the DCO never wraps.
// During reset the accumulator loads init_fcw, the initial DCO frequency code.
// The 10-bit FCW and the exponential gain follow the design description; the
// fraction width, saturation and the reset load are this design's choices.
// Timing: fcw follows fd by one clock cycle.
module dlf
  import sfd_pkg::*;
#(
  parameter int unsigned FRAC = 24,  // fractional accumulator bits
  parameter int unsigned KI_W = 4    // width of the gain exponent
) (
  input  logic             clk,
  input  logic             rst_n,
  input  fd_t              fd,         // signed frequency-error sample
  input  logic [KI_W-1:0]  ki,         // integral gain exponent
  input  logic [FCW_W-1:0] init_fcw,   // code loaded during reset
  output logic [FCW_W-1:0] fcw,        // frequency control word
  output logic             sat_hi,     // accumulator clipped at the top
  output logic             sat_lo      // accumulator clipped at zero
);

  localparam int unsigned ACC_W  = FCW_W + FRAC + 1;               // signed
  localparam int unsigned STEP_W = FD_W + (1 << KI_W);             // fd << ki
  localparam int unsigned SUM_W  = (STEP_W > ACC_W ? STEP_W : ACC_W) + 1;
  localparam logic signed [SUM_W-1:0] ACC_MAX = (SUM_W'(1) << (FCW_W + FRAC)) - 1;

  logic signed [ACC_W-1:0] acc;
  logic signed [SUM_W-1:0] step, sum;

  always_comb begin
    step = SUM_W'(fd) <<< ki;
    sum  = SUM_W'(acc) + step;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc    <= ACC_W'({1'b0, init_fcw, {FRAC{1'b0}}});
      sat_hi <= 1'b0;
      sat_lo <= 1'b0;
    end else if (sum > ACC_MAX) begin
      acc    <= ACC_W'(ACC_MAX);
      sat_hi <= 1'b1;
      sat_lo <= 1'b0;
    end else if (sum < 0) begin
      acc    <= '0;
      sat_hi <= 1'b0;
      sat_lo <= 1'b1;
    end else begin
      acc    <= ACC_W'(sum);
      sat_hi <= 1'b0;
      sat_lo <= 1'b0;
    end
  end

  assign fcw = acc[FRAC +: FCW_W];

endmodule
