// dbbc_top: one channel of a digital base band converter (DBBC), the FPGA part of
// the prototype.
//
// The IF band, sampled at 1.024 GS/s with 4 bits, arrives as two samples per
// 512 MHz clock. The chain below selects one slice of the band, centred on a local
// oscillator settable in 62.5 kHz steps, and delivers its upper and lower sidebands
// as 1- or 2-bit streams at 32 MS/s:
//
//   demux        2 x 512 MS/s -> blocks of 16 samples at 64 MS/s
//   ppo          16 parallel phase accumulators, one LO phase per sample slot
//   mixer        per-lane LUT products x*sin (I) and x*cos (Q), 4 bits
//   poly_integ   CIC integrators advanced a block at a time (DA look-up tables)
//   decimator    64 -> 32 MS/s, completing the CIC rate change of 32
//   cic_comb     16 pipelined differential stages
//   comp_fir     droop compensation and gain, then the top CIC_OUT_W bits kept
//   iq_delay / hilbert_fir   phasing method: I delayed, Q shifted by 90 degrees
//   sideband_adder           usb = I + H(Q), lsb = I - H(Q)
//   shaping_fir  64-tap low-pass of bandwidth BW_HZ, then 1/2-bit requantisation
//
// Everything runs on one clock, clk at 512 MHz; the 64 MHz and 32 MHz rates of the
// prototype are strobes (valid signals) in that clock, which is this design's choice.
// The LO is set by the controller: lo_inc is the per-sample phase increment
// (f_LO = lo_inc * 1024 MHz / 2^PHASE_W) and lo_init[i] the phase of sample slot i of
// the first block, normally phi0 + i*lo_inc. Pulse lo_load for one clock; the new
// setting applies from the next 64 MHz block. out_valid marks each 32 MS/s output;
// usb_full/lsb_full are the shaping-filter words before requantisation. Only the top
// CIC_OUT_W bits of each 84-bit comb output are used; the lower bits exist because the
// CIC needs its full width internally, and a linter reports them as unused.
module dbbc_top #(
  parameter int  LANES       = 16,
  parameter int  SAMPLE_W    = 4,
  parameter int  PHASE_W     = 14,
  parameter int  LUT_PHASE_W = 6,
  parameter int  MIX_W       = 4,
  parameter int  CIC_N       = 16,
  parameter int  CIC_OUT_W   = 12,
  parameter int  HILB_TAPS   = 63,
  parameter int  SHAPE_TAPS  = 64,
  parameter real BW_HZ       = 2.0e6,
  parameter int  FULL_W      = 16,
  parameter int  OUT_BITS    = 2,
  parameter int  Q_SHIFT     = 5
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic signed [SAMPLE_W-1:0] din     [2],
  input  logic                       lo_load,
  input  logic [PHASE_W-1:0]         lo_inc,
  input  logic [PHASE_W-1:0]         lo_init [LANES],
  output logic                       out_valid,
  output logic signed [OUT_BITS-1:0] usb,
  output logic signed [OUT_BITS-1:0] lsb,
  output logic signed [FULL_W-1:0]   usb_full,
  output logic signed [FULL_W-1:0]   lsb_full
);
  localparam int IN_LANES = 2;
  localparam int DEC      = 2;                                   // 64 -> 32 MS/s
  localparam int CIC_R    = LANES * DEC;                         // 1024 -> 32 MS/s
  localparam int ACC_W    = MIX_W + CIC_N * $clog2(CIC_R);       // CIC register width
  localparam int SB_W     = CIC_OUT_W + 1;

  // Demultiplexer and local oscillator.
  logic                       blk_valid;
  logic signed [SAMPLE_W-1:0] blk [LANES];
  logic [LUT_PHASE_W-1:0]     lo_phase [LANES];

  demux #(.LANES(LANES), .IN_LANES(IN_LANES), .SAMPLE_W(SAMPLE_W)) u_demux (
    .clk, .rst, .din, .out_valid(blk_valid), .dout(blk)
  );

  ppo #(.LANES(LANES), .PHASE_W(PHASE_W), .LUT_PHASE_W(LUT_PHASE_W)) u_ppo (
    .clk, .rst, .load(lo_load), .inc(lo_inc), .init(lo_init),
    .advance(blk_valid), .phase(lo_phase)
  );

  // Complex mixer.
  logic                    mix_valid;
  logic signed [MIX_W-1:0] mix_i [LANES];
  logic signed [MIX_W-1:0] mix_q [LANES];

  lut_complex_mixer #(
    .LANES(LANES), .SAMPLE_W(SAMPLE_W), .LUT_PHASE_W(LUT_PHASE_W), .MIX_W(MIX_W)
  ) u_mixer (
    .clk, .rst, .in_valid(blk_valid), .x(blk), .phase(lo_phase),
    .out_valid(mix_valid), .i_out(mix_i), .q_out(mix_q)
  );

  // CIC filter, compensation, one instance per branch (0 = I, 1 = Q).
  logic                        cmp_valid [2];
  logic signed [CIC_OUT_W-1:0] cmp_out   [2];

  for (genvar b = 0; b < 2; b++) begin : g_branch
    logic                        int_valid, dec_valid, comb_valid;
    logic [ACC_W-1:0]            int_y, dec_y, comb_y;
    logic signed [MIX_W-1:0]     mix [LANES];

    assign mix = (b == 0) ? mix_i : mix_q;

    poly_integrator #(.LANES(LANES), .IN_W(MIX_W), .CIC_N(CIC_N), .ACC_W(ACC_W)) u_int (
      .clk, .rst, .in_valid(mix_valid), .x(mix),
      .out_valid(int_valid), .y(int_y)
    );

    decimator #(.DEC(DEC), .W(ACC_W)) u_dec (
      .clk, .rst, .in_valid(int_valid), .din(int_y), .out_valid(dec_valid), .dout(dec_y)
    );

    cic_comb #(.CIC_N(CIC_N), .M(1), .W(ACC_W)) u_comb (
      .clk, .rst, .in_valid(dec_valid), .din(dec_y), .out_valid(comb_valid), .dout(comb_y)
    );

    // The CIC gain is (R*M)^N = 2^(ACC_W - MIX_W): keep the top bits.
    comp_fir #(.CIC_N(CIC_N), .IN_W(CIC_OUT_W), .OUT_W(CIC_OUT_W)) u_comp (
      .clk, .rst, .in_valid(comb_valid), .x(signed'(comb_y[ACC_W-1 -: CIC_OUT_W])),
      .out_valid(cmp_valid[b]), .y(cmp_out[b])
    );
  end

  // Phasing method: delay on I, Hilbert transformer on Q, sum and difference.
  logic                        i_d_valid, q_h_valid, sb_valid;
  logic signed [CIC_OUT_W-1:0] i_d, q_h;
  logic signed [SB_W-1:0]      sb_usb, sb_lsb;

  iq_delay #(.DELAY((HILB_TAPS - 1) / 2), .W(CIC_OUT_W)) u_delay (
    .clk, .rst, .in_valid(cmp_valid[0]), .x(cmp_out[0]), .out_valid(i_d_valid), .y(i_d)
  );

  hilbert_fir #(.NTAPS(HILB_TAPS), .IN_W(CIC_OUT_W), .OUT_W(CIC_OUT_W)) u_hilbert (
    .clk, .rst, .in_valid(cmp_valid[1]), .x(cmp_out[1]), .out_valid(q_h_valid), .y(q_h)
  );

  sideband_adder #(.W(CIC_OUT_W)) u_sb (
    .clk, .rst, .in_valid(i_d_valid), .i_d, .q_h,
    .out_valid(sb_valid), .usb(sb_usb), .lsb(sb_lsb)
  );

  // Final band shaping and requantisation, one filter per sideband.
  logic usb_valid, lsb_valid;

  shaping_fir #(
    .NTAPS(SHAPE_TAPS), .BW_HZ(BW_HZ), .FS_HZ(1024.0e6 / CIC_R), .IN_W(SB_W),
    .FULL_W(FULL_W), .OUT_BITS(OUT_BITS), .Q_SHIFT(Q_SHIFT)
  ) u_shape_usb (
    .clk, .rst, .in_valid(sb_valid), .x(sb_usb), .out_valid(usb_valid), .y_full(usb_full), .y_q(usb)
  );

  shaping_fir #(
    .NTAPS(SHAPE_TAPS), .BW_HZ(BW_HZ), .FS_HZ(1024.0e6 / CIC_R), .IN_W(SB_W),
    .FULL_W(FULL_W), .OUT_BITS(OUT_BITS), .Q_SHIFT(Q_SHIFT)
  ) u_shape_lsb (
    .clk, .rst, .in_valid(sb_valid), .x(sb_lsb), .out_valid(lsb_valid), .y_full(lsb_full), .y_q(lsb)
  );

  assign out_valid = usb_valid;

  // The two branches and the two sidebands run in lock step.
  always_ff @(posedge clk)
    if (!rst) begin
      assert (cmp_valid[0] == cmp_valid[1]) else $error("I and Q branches out of step");
      assert (i_d_valid == q_h_valid) else $error("delay and Hilbert outputs out of step");
      assert (usb_valid == lsb_valid) else $error("sideband outputs out of step");
    end
endmodule
