// lut_complex_mixer: sixteen-lane complex mixer built from look-up tables.
//
// Each lane multiplies its 4-bit sample by the sine (I branch) and cosine (Q branch)
// of the local-oscillator phase of the same sample slot. The product is not computed
// with multipliers: the sample and the LO phase together address a table whose entry
// is the product already rescaled to MIX_W bits, round(x * sin(2*pi*p/2^LUT_PHASE_W))
// for I and the same with cos for Q, clipped to the MIX_W-bit range. With 4 + 6
// address bits and 4-bit entries one table is 4 kbit. The tables are filled at
// elaboration. Sine on I and cosine on Q, and the 4-bit result, follow the prototype;
// the 6-bit phase address and the rounding are this design's choices.
//
// Timing: in_valid with x and phase in, one clock later out_valid with the products.
module lut_complex_mixer
  import dbbc_pkg::*;
#(
  parameter int LANES       = 16,
  parameter int SAMPLE_W    = 4,
  parameter int LUT_PHASE_W = 6,
  parameter int MIX_W       = 4
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       in_valid,
  input  logic signed [SAMPLE_W-1:0] x     [LANES],
  input  logic [LUT_PHASE_W-1:0]     phase [LANES],
  output logic                       out_valid,
  output logic signed [MIX_W-1:0]    i_out [LANES],
  output logic signed [MIX_W-1:0]    q_out [LANES]
);
  localparam int AW = SAMPLE_W + LUT_PHASE_W;

  logic signed [MIX_W-1:0] rom_i [2**AW];
  logic signed [MIX_W-1:0] rom_q [2**AW];

  for (genvar a = 0; a < 2**AW; a++) begin : g_rom
    localparam int XU = a / (2**LUT_PHASE_W);
    localparam int XS = (XU >= 2**(SAMPLE_W-1)) ? XU - 2**SAMPLE_W : XU;
    localparam int P  = a % (2**LUT_PHASE_W);
    assign rom_i[a] = MIX_W'(mix_lut(XS, P, LUT_PHASE_W, 1'b0, SAMPLE_W, MIX_W));
    assign rom_q[a] = MIX_W'(mix_lut(XS, P, LUT_PHASE_W, 1'b1, SAMPLE_W, MIX_W));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      for (int l = 0; l < LANES; l++) begin
        i_out[l] <= '0;
        q_out[l] <= '0;
      end
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        for (int l = 0; l < LANES; l++) begin
          i_out[l] <= rom_i[{x[l], phase[l]}];
          q_out[l] <= rom_q[{x[l], phase[l]}];
        end
    end
  end
endmodule
