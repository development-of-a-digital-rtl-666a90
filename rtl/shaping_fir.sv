// shaping_fir: the final 64-tap low-pass that sets the channel bandwidth, followed by
// requantisation to one or two bits.
//
// The coefficients are a Hamming-windowed sinc with cut-off BW_HZ at the FS_HZ
// (32 MS/s) sample rate, normalised to unit gain at DC and rounded to Q(COEF_FRAC);
// they are computed at elaboration, so changing the bandwidth (2 MHz down to 62.5 kHz
// in octaves) means rebuilding with another BW_HZ, as the prototype reloads its FPGA
// configuration. y_full is the filter output rounded and saturated to FULL_W bits.
// y_q is y_full shifted right by Q_SHIFT and saturated to OUT_BITS two's complement
// bits: for OUT_BITS = 1 the sign, for 2 the four levels -2..1.
// Timing: two clocks from in_valid to out_valid, y_full and y_q together. The
// 64 taps, the transposed structure and the 1-2 bit output follow the prototype; the
// window design and the quantiser thresholds are this design's choices.
module shaping_fir
  import dbbc_pkg::*;
#(
  parameter int  NTAPS     = 64,
  parameter real BW_HZ     = 2.0e6,
  parameter real FS_HZ     = 32.0e6,
  parameter int  IN_W      = 13,
  parameter int  FULL_W    = 16,
  parameter int  OUT_BITS  = 2,
  parameter int  Q_SHIFT   = 5,
  parameter int  COEF_FRAC = 16
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       in_valid,
  input  logic signed [IN_W-1:0]     x,
  output logic                       out_valid,
  output logic signed [FULL_W-1:0]   y_full,
  output logic signed [OUT_BITS-1:0] y_q
);
  typedef int coef_t [NTAPS];

  function automatic coef_t make_coef();
    coef_t c;
    real   h [NTAPS];
    real   sum = 0.0;
    real   fc  = BW_HZ / FS_HZ;
    for (int k = 0; k < NTAPS; k++) begin
      real t = k - (NTAPS - 1) / 2.0;
      h[k] = ((t == 0.0) ? 2.0 * fc : $sin(2.0 * PI * fc * t) / (PI * t)) * hamming(k, NTAPS);
      sum += h[k];
    end
    for (int k = 0; k < NTAPS; k++) c[k] = int'(round_r(h[k] / sum * (2.0 ** COEF_FRAC)));
    return c;
  endfunction

  localparam coef_t COEF = make_coef();

  fir_inverse #(
    .NTAPS (NTAPS), .IN_W(IN_W), .COEF_W(COEF_FRAC + 1), .ACC_W(IN_W + COEF_FRAC + 8),
    .OUT_W (FULL_W), .SHIFT(COEF_FRAC), .COEF(COEF)
  ) u_fir (
    .clk, .rst, .in_valid, .x, .out_valid, .y(y_full)
  );

  // Requantisation of the filter output.
  logic signed [FULL_W-1:0] ys;
  always_comb begin
    ys = y_full >>> Q_SHIFT;
    if (ys > FULL_W'((1 << (OUT_BITS - 1)) - 1))  y_q = {1'b0, {(OUT_BITS-1){1'b1}}};
    else if (ys < -FULL_W'(1 << (OUT_BITS - 1))) y_q = {1'b1, {(OUT_BITS-1){1'b0}}};
    else                                         y_q = OUT_BITS'(ys);
  end
endmodule
