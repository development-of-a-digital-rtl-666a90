// tb_fir_inverse: a 5-tap transposed FIR with mixed-sign coefficients against a
// direct convolution with the same rounding and saturation, for random and
// full-scale inputs; checks the two-clock latency.
module tb_fir_inverse;
  localparam int NT = 5, IW = 12, OW = 10, SH = 3;
  localparam int CO [NT] = '{3, -17, 40, -9, 5};
  logic clk = 1'b0, rst = 1'b1;
  logic in_valid = 1'b0, out_valid;
  logic signed [IW-1:0] x;
  logic signed [OW-1:0] y;
  int xs [$];
  int checks = 0, failures = 0, nout = 0, cyc = 0, sat = 0;
  int in_time [$];

  fir_inverse #(.NTAPS(NT), .IN_W(IW), .COEF_W(8), .ACC_W(24), .OUT_W(OW), .SHIFT(SH), .COEF(CO))
    dut (.clk, .rst, .in_valid, .x, .out_valid, .y);

  always #1 clk = ~clk;

  function automatic int expected(int n);
    longint acc = 0;
    longint r;
    for (int k = 0; k < NT; k++) if (n - k >= 0) acc += longint'(CO[k]) * xs[n - k];
    r = (acc + (1 << (SH - 1))) >>> SH;
    if (r > (1 << (OW - 1)) - 1) r = (1 << (OW - 1)) - 1;
    if (r < -(1 << (OW - 1))) r = -(1 << (OW - 1));
    return int'(r);
  endfunction

  initial begin
    x = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      in_valid = (t % 3 == 0);
      if (t < 300) x = IW'($urandom);
      else         x = ((t / 30) % 2 == 0) ? 12'sd2047 : -12'sd2048;
      if (in_valid) begin xs.push_back(int'(x)); in_time.push_back(cyc); end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (4) @(negedge clk);
    checks += 2;
    if (nout != xs.size()) begin failures++; $display("outputs %0d", nout); end
    if (sat == 0) begin failures++; $display("saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    cyc++;
    if (out_valid) begin
      int e;
      e = expected(nout);
      checks += 2;
      if (int'(y) != e) begin failures++; $display("n=%0d got %0d exp %0d", nout, y, e); end
      if (cyc - in_time[nout] != 3) begin failures++; $display("latency %0d", cyc - in_time[nout] - 1); end
      if (e == 511 || e == -512) sat++;
      nout++;
    end
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
