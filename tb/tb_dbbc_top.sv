// tb_dbbc_top: end-to-end test of the converter at its default sizes.
//
// A 4-bit sampled tone (with a little random dither) is fed at 1.024 GS/s, two
// samples per clock. The controller's job is done here: for an LO frequency f_LO it
// sets inc = f_LO * 2^14 / 1024 MHz and precomputes the slot phases i*inc. Four runs:
//   1. LO 100 MHz, tone 101 MHz: the tone must come out of the USB, not the LSB.
//   2. LO reloaded to 102 MHz (mode switch), same tone: now in the LSB only.
//   3. LO 100 MHz, tone 108 MHz: outside the 2 MHz band, both outputs nearly silent.
//   4. LO 100 MHz, tone 100.5 MHz: USB again, and its frequency must be 0.5 MHz.
// Throughout, out_valid must come exactly every 16 clocks (32 MS/s), and the 2-bit
// outputs must match the saturated full words. Each mechanism is counted: LO loads,
// USB selections, LSB selections, out-of-band rejections, quantiser saturation.
// The wanted sideband must be 30 dB above the other at 1 MHz (17 dB at 0.5 MHz, where
// the 63-tap Hilbert filter loses accuracy), a tone outside the band must come out
// 30 dB below an in-band one, and the in-band gain must match the chain's scaling.
module tb_dbbc_top;
  localparam real PI = 3.141592653589793;
  localparam int  SETTLE = 300, MEAS = 512;

  logic clk = 1'b0, rst = 1'b1;
  logic signed [3:0] din [2];
  logic lo_load = 1'b0;
  logic [13:0] lo_inc, lo_init [16];
  logic out_valid;
  logic signed [1:0] usb, lsb;
  logic signed [15:0] usb_full, lsb_full;

  int checks = 0, failures = 0;
  int n_load = 0, n_usb = 0, n_lsb = 0, n_reject = 0, n_sat = 0;

  dbbc_top dut (.clk, .rst, .din, .lo_load, .lo_inc, .lo_init, .out_valid, .usb, .lsb,
                .usb_full, .lsb_full);

  always #1 clk = ~clk;

  // Input: tone at f_tone, amplitude 6.5 LSB plus uniform dither of +-0.5 LSB.
  real    f_tone = 101.0e6;
  longint n_samp = 0;
  function automatic logic signed [3:0] adc(real f, longint n);
    int  d = int'($urandom_range(0, 1000)) - 500;
    real v = 6.5 * $cos(2.0 * PI * f / 1024.0e6 * n) + d / 1000.0;
    int  r;
    r = int'($floor(v + 0.5));
    if (r > 7) r = 7;
    if (r < -8) r = -8;
    return 4'(r);
  endfunction
  always @(negedge clk) begin
    din[0] <= adc(f_tone, n_samp);
    din[1] <= adc(f_tone, n_samp + 1);
    n_samp += 2;
  end

  // Output collection and rate check.
  real  us [$], ls [$];
  int   cyc = 0, last = -1;
  always @(posedge clk) if (!rst) begin
    cyc++;
    if (out_valid) begin
      int e;
      us.push_back(real'(usb_full));
      ls.push_back(real'(lsb_full));
      if (last >= 0) begin
        checks++;
        if (cyc - last != 16) begin failures++; $display("output spacing %0d", cyc - last); end
      end
      last = cyc;
      e = int'(usb_full) >>> 5;
      if (e > 1) e = 1;
      if (e < -2) e = -2;
      if (e == 1 || e == -2) n_sat++;
      checks++;
      if (int'(usb) != e) begin failures++; $display("usb code %0d for %0d", usb, usb_full); end
    end
  end

  // The controller: precompute and load an LO setting at a block boundary.
  task automatic set_lo(real f_lo);
    int inc = int'(f_lo * 16384.0 / 1024.0e6);
    @(negedge clk);
    lo_inc = 14'(inc);
    for (int i = 0; i < 16; i++) lo_init[i] = 14'(i * inc);
    lo_load = 1'b1;
    @(negedge clk);
    lo_load = 1'b0;
    n_load++;
  endtask

  function automatic real power(real q [$], int n0, int n1);
    real p = 0.0;
    for (int n = n0; n < n1; n++) p += q[n] * q[n];
    return p / (n1 - n0);
  endfunction

  task automatic collect(output real pu, output real pl, output int zc);
    int base;
    base = us.size();
    wait (us.size() >= base + SETTLE + MEAS);
    pu = power(us, base + SETTLE, base + SETTLE + MEAS);
    pl = power(ls, base + SETTLE, base + SETTLE + MEAS);
    zc = 0;
    for (int n = base + SETTLE + 1; n < base + SETTLE + MEAS; n++)
      if ((us[n - 1] < 0.0) != (us[n] < 0.0)) zc++;
  endtask

  initial begin
    real pu, pl, p_ref;
    int  zc;
    for (int i = 0; i < 16; i++) lo_init[i] = '0;
    lo_inc = '0;
    repeat (4) @(negedge clk);
    rst = 1'b0;

    // 1: tone 1 MHz above the LO
    set_lo(100.0e6); f_tone = 101.0e6;
    collect(pu, pl, zc);
    $display("run 1: USB power %0.1f  LSB power %0.1f", pu, pl);
    checks += 2;
    // Expected USB amplitude: 6.5 (input) * 256 (CIC output scaling) = 1664, power 1.38e6.
    if (pu < 1.1e6 || pu > 1.7e6) begin failures++; $display("run 1: USB gain wrong"); end
    if (pu < 1000.0 * pl) begin failures++; $display("run 1: sideband rejection under 30 dB"); end
    else n_usb++;
    p_ref = pu;

    // 2: LO moved 1 MHz above the tone
    set_lo(102.0e6);
    collect(pu, pl, zc);
    $display("run 2: USB power %0.1f  LSB power %0.1f", pu, pl);
    checks += 2;
    if (pl < 1.1e6 || pl > 1.7e6) begin failures++; $display("run 2: LSB gain wrong"); end
    if (pl < 1000.0 * pu) begin failures++; $display("run 2: sideband rejection under 30 dB"); end
    else n_lsb++;

    // 3: tone 8 MHz above the LO, outside the 2 MHz band
    set_lo(100.0e6); f_tone = 108.0e6;
    collect(pu, pl, zc);
    $display("run 3: USB power %0.1f  LSB power %0.1f", pu, pl);
    checks++;
    if (pu > 0.001 * p_ref || pl > 0.001 * p_ref) begin failures++; $display("run 3: out-of-band tone not rejected"); end
    else n_reject++;

    // 4: tone 0.5 MHz above the LO: USB at 0.5 MHz, i.e. 2*0.5/32 zero crossings per sample
    f_tone = 100.5e6;
    collect(pu, pl, zc);
    $display("run 4: USB power %0.1f  LSB power %0.1f  zero crossings %0d", pu, pl, zc);
    checks += 2;
    if (pu < 50.0 * pl) begin failures++; $display("run 4: sideband rejection under 17 dB"); end
    else n_usb++;
    if (zc < 14 || zc > 18) begin failures++; $display("run 4: wrong output frequency"); end

    $display("mechanisms: LO loads %0d, USB selections %0d, LSB selections %0d, rejections %0d, quantiser saturations %0d",
             n_load, n_usb, n_lsb, n_reject, n_sat);
    checks += 5;
    if (n_load == 0)   failures++;
    if (n_usb == 0)    failures++;
    if (n_lsb == 0)    failures++;
    if (n_reject == 0) failures++;
    if (n_sat == 0)    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * 16 * (SETTLE + MEAS + 100)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
