// demux: 1-to-8 deserialiser from 2x512 MS/s to 16x64 MS/s.
//
// The A/D board delivers two 4-bit samples per 512 MHz clock, din[0] being the
// earlier one. The demux collects eight such pairs and presents them as one block of
// sixteen time-adjacent samples, dout[0] the earliest, with out_valid high for one
// clock in eight: that strobe is the 64 MHz rate of the rest of the chain. The block
// is registered, so dout changes one clock after its last pair arrived. The 16-sample
// grouping and the rates follow the prototype; building the slow rate as a strobe in
// the fast clock domain, rather than as a separate 64 MHz clock, is this design's
// choice. Synchronous active-high reset.
module demux #(
  parameter int LANES    = 16,
  parameter int IN_LANES = 2,
  parameter int SAMPLE_W = 4
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic signed [SAMPLE_W-1:0] din  [IN_LANES],
  output logic                       out_valid,
  output logic signed [SAMPLE_W-1:0] dout [LANES]
);
  localparam int STEPS = LANES / IN_LANES;
  localparam int CW    = (STEPS > 1) ? $clog2(STEPS) : 1;

  logic [CW-1:0]              cnt;
  logic signed [SAMPLE_W-1:0] sh [LANES];

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt       <= '0;
      out_valid <= 1'b0;
      for (int k = 0; k < LANES; k++) begin
        sh[k]   <= '0;
        dout[k] <= '0;
      end
    end else begin
      for (int j = 0; j < IN_LANES; j++) sh[int'(cnt) * IN_LANES + j] <= din[j];
      if (int'(cnt) == STEPS - 1) begin
        cnt       <= '0;
        out_valid <= 1'b1;
        for (int k = 0; k < LANES - IN_LANES; k++) dout[k] <= sh[k];
        for (int j = 0; j < IN_LANES; j++) dout[LANES - IN_LANES + j] <= din[j];
      end else begin
        cnt       <= cnt + 1'b1;
        out_valid <= 1'b0;
      end
    end
  end

  initial assert (LANES % IN_LANES == 0) else $error("LANES must be a multiple of IN_LANES");
endmodule
