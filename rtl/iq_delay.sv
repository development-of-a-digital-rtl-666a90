// iq_delay: delay unit of the in-phase branch.
//
// The Hilbert filter on the Q branch delays its signal by (NTAPS-1)/2 samples. This
// block delays the I samples by the same DELAY samples and with the same two-clock
// pipeline as the filter, so that the two streams reach the sideband adder aligned
// sample for sample and clock for clock. A sample-strobed shift register of DELAY+1
// words followed by an output register. The delay unit follows the prototype; its
// exact pipeline matching is this design's choice.
module iq_delay #(
  parameter int DELAY = 31,
  parameter int W     = 12
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic signed [W-1:0] x,
  output logic                out_valid,
  output logic signed [W-1:0] y
);
  logic signed [W-1:0] sr [DELAY+1];
  logic                v1;

  always_ff @(posedge clk) begin
    if (rst) begin
      v1        <= 1'b0;
      out_valid <= 1'b0;
      y         <= '0;
      for (int k = 0; k <= DELAY; k++) sr[k] <= '0;
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
      if (in_valid) begin
        sr[0] <= x;
        for (int k = 1; k <= DELAY; k++) sr[k] <= sr[k-1];
      end
      if (v1) y <= sr[DELAY];
    end
  end
endmodule
