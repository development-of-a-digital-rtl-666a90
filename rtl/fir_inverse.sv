// fir_inverse: fully pipelined FIR filter in the transposed ("inverse") form.
//
// The input sample is registered and multiplied by every coefficient at once; the
// products enter a chain of adders separated by registers, p[k] <= p[k+1] + h[k]*x,
// so no adder is longer than one two-input add whatever the number of taps. The
// output y[n] = sum_k h[k] x[n-k] is the head of the chain, shifted right by SHIFT
// with rounding and saturated to OUT_W bits. The chain only moves on a sample
// strobe, so the filter runs at the rate of its strobe.
//
// Timing: x with in_valid; y with out_valid two clocks later. Coefficients are the
// COEF parameter (signed, COEF_W bits). The transposed structure follows the
// prototype, which uses it for all its filters; the rounding and saturation are this
// design's choices.
module fir_inverse #(
  parameter int NTAPS  = 4,
  parameter int IN_W   = 12,
  parameter int COEF_W = 16,
  parameter int ACC_W  = 36,
  parameter int OUT_W  = 12,
  parameter int SHIFT  = 2,
  parameter int COEF [NTAPS] = '{default: 1}
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  x,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] y
);
  logic signed [IN_W-1:0]   xr;
  logic                     v1;
  logic signed [ACC_W-1:0]  p [NTAPS];
  logic signed [ACC_W-1:0]  rnd;

  always_ff @(posedge clk) begin
    if (rst) begin
      xr        <= '0;
      v1        <= 1'b0;
      out_valid <= 1'b0;
      for (int k = 0; k < NTAPS; k++) p[k] <= '0;
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
      if (in_valid) xr <= x;
      if (v1)
        for (int k = 0; k < NTAPS; k++)
          p[k] <= ((k == NTAPS - 1) ? ACC_W'(0) : p[(k == NTAPS - 1) ? k : k + 1])
                + ACC_W'(xr) * ACC_W'(signed'(COEF_W'(COEF[k])));
    end
  end

  // Round to nearest and saturate to the output width.
  always_comb begin
    if (SHIFT > 0) rnd = (p[0] + (ACC_W'(1) <<< (SHIFT > 0 ? SHIFT - 1 : 0))) >>> SHIFT;
    else           rnd = p[0];
    if (rnd > ACC_W'((64'sd1 <<< (OUT_W - 1)) - 1))      y = {1'b0, {(OUT_W-1){1'b1}}};
    else if (rnd < -ACC_W'(64'sd1 <<< (OUT_W - 1)))      y = {1'b1, {(OUT_W-1){1'b0}}};
    else                                                 y = OUT_W'(rnd);
  end
endmodule
