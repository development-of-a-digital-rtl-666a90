// cic_comb: the comb half of the CIC filter, CIC_N pipelined differential stages.
//
// Each stage outputs its input minus the input M samples earlier (1 - z^-M at the
// 32 MS/s rate, i.e. 1 - z^-RM at the input rate). Stage k registers its result and
// passes its strobe on, so the stages form a pipeline: a sample entering with
// in_valid leaves CIC_N clocks later with out_valid. All arithmetic wraps modulo
// 2^W, matching the integrators. Sixteen stages follow the prototype; M = 1 is this
// design's choice.
module cic_comb #(
  parameter int CIC_N = 16,
  parameter int M     = 1,
  parameter int W     = 84
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  logic [W-1:0] din,
  output logic         out_valid,
  output logic [W-1:0] dout
);
  logic [W-1:0] st  [CIC_N+1];
  logic         v   [CIC_N+1];
  logic [W-1:0] dly [CIC_N][M];

  assign st[0] = din;
  assign v[0]  = in_valid;

  for (genvar k = 0; k < CIC_N; k++) begin : g_stage
    always_ff @(posedge clk) begin
      if (rst) begin
        v[k+1]  <= 1'b0;
        st[k+1] <= '0;
        for (int d = 0; d < M; d++) dly[k][d] <= '0;
      end else begin
        v[k+1] <= v[k];
        if (v[k]) begin
          st[k+1]   <= st[k] - dly[k][M-1];
          dly[k][0] <= st[k];
          for (int d = 1; d < M; d++) dly[k][d] <= dly[k][d-1];
        end
      end
    end
  end

  assign dout      = st[CIC_N];
  assign out_valid = v[CIC_N];
endmodule
