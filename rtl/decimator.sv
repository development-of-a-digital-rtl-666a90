// decimator: the rate-change switch of the CIC filter.
//
// Between the integrators and the comb stages a CIC filter only keeps every R-th
// integrator output. The integrators here already produce one value per 16 input
// samples (64 MS/s), so this block keeps one value in DEC = 2, bringing the I or Q
// stream to 32 MS/s, the rate used for every bandwidth. The first sample after reset
// is kept. Timing: out_valid and dout one clock after the kept in_valid. The factor
// follows the prototype; which phase is kept is this design's choice.
module decimator #(
  parameter int DEC = 2,
  parameter int W   = 84
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  logic [W-1:0] din,
  output logic         out_valid,
  output logic [W-1:0] dout
);
  localparam int CW = (DEC > 1) ? $clog2(DEC) : 1;
  logic [CW-1:0] ph;

  always_ff @(posedge clk) begin
    if (rst) begin
      ph        <= '0;
      out_valid <= 1'b0;
      dout      <= '0;
    end else begin
      out_valid <= in_valid && (ph == '0);
      if (in_valid) begin
        if (ph == '0) dout <= din;
        ph <= (int'(ph) == DEC - 1) ? '0 : ph + 1'b1;
      end
    end
  end
endmodule
