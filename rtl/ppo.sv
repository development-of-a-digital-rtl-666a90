// ppo: parallel pre-computed oscillator, the local oscillator of the converter.
//
// A conventional NCO adds a phase increment every sample, which at 1.024 GS/s is
// out of reach of the FPGA. Here sixteen phase accumulators run in parallel at the
// 64 MHz block rate, accumulator i holding the phase of sample slot i of the current
// block. Each block every accumulator advances by 16 times the per-sample increment.
// The controller loads, together with the increment, the sixteen initial phases
// phi0 + i*inc that it has computed itself; that gives absolute phase control. The
// LO frequency is inc * 1024 MHz / 2^PHASE_W, so 14 bits give the 62.5 kHz step.
//
// Interface: load (with inc and init) takes priority over advance. phase[i] is the
// top LUT_PHASE_W bits of accumulator i (truncation) and belongs to the block whose
// strobe is on advance in the same clock; the accumulators step at that edge. The
// per-slot structure follows the prototype; the width of the LUT address and the
// truncation are this design's choices.
module ppo #(
  parameter int LANES       = 16,
  parameter int PHASE_W     = 14,
  parameter int LUT_PHASE_W = 6
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   load,
  input  logic [PHASE_W-1:0]     inc,
  input  logic [PHASE_W-1:0]     init  [LANES],
  input  logic                   advance,
  output logic [LUT_PHASE_W-1:0] phase [LANES]
);
  logic [PHASE_W-1:0] acc [LANES];
  logic [PHASE_W-1:0] step;

  always_ff @(posedge clk) begin
    if (rst) begin
      step <= '0;
      for (int i = 0; i < LANES; i++) acc[i] <= '0;
    end else if (load) begin
      step <= PHASE_W'(inc * PHASE_W'(LANES));
      for (int i = 0; i < LANES; i++) acc[i] <= init[i];
    end else if (advance) begin
      for (int i = 0; i < LANES; i++) acc[i] <= acc[i] + step;
    end
  end

  always_comb
    for (int i = 0; i < LANES; i++) phase[i] = acc[i][PHASE_W-1 -: LUT_PHASE_W];
endmodule
