// hilbert_fir: Hilbert transformer on the quadrature branch.
//
// An odd-length antisymmetric FIR approximating a 90 degree phase shift with flat
// group delay (NTAPS-1)/2 samples. With centre c, tap k has
// h[k] = -2/(pi (k-c)) for odd k-c and 0 for even k-c, times a Hamming window; the
// sign gives positive frequencies a +90 degree shift, so that with I = x*sin(LO) and
// Q = x*cos(LO) the sum of delayed I and filtered Q is the upper sideband. Gain in
// the pass band is close to 1 (coefficients in Q(COEF_FRAC), output shifted back).
// Implemented on fir_inverse; two clocks from in_valid to out_valid. The Hilbert
// filter as a FIR in the Q branch follows the prototype; its length, window and
// coefficient precision are this design's choices.
module hilbert_fir
  import dbbc_pkg::*;
#(
  parameter int NTAPS     = 63,
  parameter int IN_W      = 12,
  parameter int OUT_W     = 12,
  parameter int COEF_FRAC = 14
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  x,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] y
);
  typedef int coef_t [NTAPS];

  function automatic coef_t make_coef();
    coef_t c;
    for (int k = 0; k < NTAPS; k++) begin
      int n = k - (NTAPS - 1) / 2;
      if (n % 2 == 0) c[k] = 0;
      else c[k] = int'(round_r(-2.0 / (PI * n) * hamming(k, NTAPS) * (2.0 ** COEF_FRAC)));
    end
    return c;
  endfunction

  localparam coef_t COEF = make_coef();

  fir_inverse #(
    .NTAPS (NTAPS), .IN_W(IN_W), .COEF_W(COEF_FRAC + 1), .ACC_W(IN_W + COEF_FRAC + 8),
    .OUT_W (OUT_W), .SHIFT(COEF_FRAC), .COEF(COEF)
  ) u_fir (
    .clk, .rst, .in_valid, .x, .out_valid, .y
  );

  initial assert (NTAPS % 2 == 1) else $error("the Hilbert filter needs an odd length");
endmodule
