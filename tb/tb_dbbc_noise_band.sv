// tb_dbbc_noise_band: the converter at its default sizes on broadband receiver noise,
// the way a converted 2 MHz band is observed in practice.
//
// The input is Gaussian-like noise (sum of four uniform variates, sigma about 2.3 LSB)
// quantised to 4 bits at 1.024 GS/s, with the LO at 300 MHz. After the filters have
// settled, 8192 output samples of each sideband are analysed with an averaged
// periodogram (64 segments of 128 samples, 0.25 MHz bins). Checks:
//   - the band 0.5-1.5 MHz is flat to within 3 dB (closer to the LO the 63-tap
//     Hilbert filter loses accuracy and the two sidebands leak into each other),
//   - the stop band 4-15 MHz lies at least 25 dB below it,
//   - USB and LSB carry the same power to within 1 dB (white input),
//   - all four 2-bit output levels occur on both sidebands.
module tb_dbbc_noise_band;
  localparam real PI = 3.141592653589793;
  localparam int  SETTLE = 300, NSEG = 64, SEG = 128;

  logic clk = 1'b0, rst = 1'b1;
  logic signed [3:0] din [2];
  logic lo_load = 1'b0;
  logic [13:0] lo_inc, lo_init [16];
  logic out_valid;
  logic signed [1:0] usb, lsb;
  logic signed [15:0] usb_full, lsb_full;
  int checks = 0, failures = 0;

  dbbc_top dut (.clk, .rst, .din, .lo_load, .lo_inc, .lo_init, .out_valid, .usb, .lsb,
                .usb_full, .lsb_full);

  always #1 clk = ~clk;

  function automatic logic signed [3:0] noise_sample();
    int s = 0;
    int r;
    for (int i = 0; i < 4; i++) s += int'($urandom_range(0, 2000)) - 1000;
    // sum of 4 uniforms on +-1000 has sigma 1155; scale to 2.3 LSB
    r = int'($floor(s * 2.3 / 1155.0 + 0.5));
    if (r > 7) r = 7;
    if (r < -8) r = -8;
    return 4'(r);
  endfunction

  always @(negedge clk) begin
    din[0] <= noise_sample();
    din[1] <= noise_sample();
  end

  real us [$], ls [$];
  int  lev_u [4], lev_l [4];
  always @(posedge clk) if (!rst && out_valid) begin
    us.push_back(real'(usb_full));
    ls.push_back(real'(lsb_full));
    if (us.size() > SETTLE) begin
      lev_u[int'(usb) + 2]++;
      lev_l[int'(lsb) + 2]++;
    end
  end

  // Averaged periodogram bin k (k * 0.25 MHz) of q[SETTLE ...], Hann window.
  function automatic real psd(real q [$], int k);
    real acc = 0.0;
    for (int s = 0; s < NSEG; s++) begin
      real c = 0.0, d = 0.0;
      for (int n = 0; n < SEG; n++) begin
        real w = 0.5 - 0.5 * $cos(2.0 * PI * n / SEG);
        real v = q[SETTLE + s * SEG + n] * w;
        c += v * $cos(2.0 * PI * k * n / SEG);
        d += v * $sin(2.0 * PI * k * n / SEG);
      end
      acc += c * c + d * d;
    end
    return acc / NSEG;
  endfunction

  task automatic check_side(string name, real q [$], output real pband);
    real pmin = 1.0e30, pmax = 0.0, pstop = 0.0;
    pband = 0.0;
    for (int k = 2; k <= 6; k++) begin
      real p = psd(q, k);
      pband += p / 5.0;
      if (p < pmin) pmin = p;
      if (p > pmax) pmax = p;
    end
    for (int k = 16; k <= 60; k++) pstop += psd(q, k) / 45.0;
    $display("%s: in-band %e (min %e max %e), stop band %e, ratio %0.1f dB", name, pband, pmin,
             pmax, pstop, 10.0 * $log10(pband / pstop));
    checks += 2;
    if (pmax > 2.0 * pmin) begin failures++; $display("%s: band not flat within 3 dB", name); end
    if (pband < 316.0 * pstop) begin failures++; $display("%s: stop band under 25 dB", name); end
  endtask

  initial begin
    real pu, pl;
    for (int i = 0; i < 16; i++) lo_init[i] = '0;
    lo_inc = '0;
    for (int i = 0; i < 4; i++) begin lev_u[i] = 0; lev_l[i] = 0; end
    repeat (4) @(negedge clk);
    rst = 1'b0;
    // LO 300 MHz: inc = 300e6 * 2^14 / 1.024e9 = 4800
    @(negedge clk);
    lo_inc = 14'd4800;
    for (int i = 0; i < 16; i++) lo_init[i] = 14'(i * 4800);
    lo_load = 1'b1;
    @(negedge clk);
    lo_load = 1'b0;
    wait (us.size() >= SETTLE + NSEG * SEG);
    check_side("USB", us, pu);
    check_side("LSB", ls, pl);
    checks++;
    if (pu > 1.26 * pl || pl > 1.26 * pu) begin failures++; $display("USB/LSB power differ by over 1 dB"); end
    $display("2-bit levels USB %0d %0d %0d %0d, LSB %0d %0d %0d %0d", lev_u[0], lev_u[1], lev_u[2],
             lev_u[3], lev_l[0], lev_l[1], lev_l[2], lev_l[3]);
    for (int i = 0; i < 4; i++) begin
      checks += 2;
      if (lev_u[i] == 0) begin failures++; $display("USB level %0d never used", i - 2); end
      if (lev_l[i] == 0) begin failures++; $display("LSB level %0d never used", i - 2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (16 * (SETTLE + NSEG * SEG + 200)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
