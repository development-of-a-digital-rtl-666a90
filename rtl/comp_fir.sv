// comp_fir: CIC droop compensation and gain rescaling for one branch (I or Q).
//
// An N-stage CIC with a large rate change has the pass-band response
// (sin(pi f)/(pi f))^N, f in units of the 32 MS/s output rate; the compensator should
// follow its inverse (x/sin x)^N. This block uses the shortest symmetric filter that
// does so to second order, h = [-a, 1+2a, -a] with a = N/24: its response
// 1 + 4a(pi f)^2 + ... cancels the CIC's 1 - N(pi f)^2/6 + ... at low frequency. The
// coefficients are computed at elaboration in Q(COEF_FRAC). The output is scaled by
// 2^GAIN_SHIFT, the coarse gain of the chain, and saturated to OUT_W bits.
// Implemented on fir_inverse; timing is two clocks from in_valid to out_valid.
// That a compensator follows the CIC and also rescales the gain is from the
// prototype; its length and coefficients are this design's choice.
module comp_fir
  import dbbc_pkg::*;
#(
  parameter int CIC_N      = 16,
  parameter int IN_W       = 12,
  parameter int OUT_W      = 12,
  parameter int COEF_FRAC  = 12,
  parameter int GAIN_SHIFT = 0
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  x,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] y
);
  localparam int NTAPS = 3;
  localparam int A     = int'(round_r(CIC_N / 24.0 * (2.0 ** COEF_FRAC)));
  localparam int ONE   = 2 ** COEF_FRAC;
  localparam int COEF [NTAPS] = '{-A, ONE + 2 * A, -A};
  localparam int COEF_W = $clog2(ONE + 2 * A) + 2;

  fir_inverse #(
    .NTAPS (NTAPS), .IN_W(IN_W), .COEF_W(COEF_W), .ACC_W(IN_W + COEF_W + 2),
    .OUT_W (OUT_W), .SHIFT(COEF_FRAC - GAIN_SHIFT), .COEF(COEF)
  ) u_fir (
    .clk, .rst, .in_valid, .x, .out_valid, .y
  );
endmodule
