// tb_shaping_fir: the 2 MHz, 64-tap shaping filter at 32 MS/s. Checks unit DC gain,
// that a 1 MHz tone passes within 1 dB, that a 6 MHz tone is attenuated by at least
// 30 dB, and that the 2-bit output is the saturated y_full >> 5 at every sample. A
// second instance built for 1-bit output must give the sign of its y_full.
module tb_shaping_fir;
  localparam real PI = 3.141592653589793;
  logic clk = 1'b0, rst = 1'b1;
  logic in_valid = 1'b0, out_valid;
  logic signed [12:0] x;
  logic signed [15:0] y_full;
  logic signed [1:0] y_q;
  int ys [$];
  int checks = 0, failures = 0, qsat = 0;

  shaping_fir dut (.clk, .rst, .in_valid, .x, .out_valid, .y_full, .y_q);

  logic               ov1;
  logic signed [15:0] yf1;
  logic signed [0:0]  yq1;
  int                 n_neg1 = 0;
  shaping_fir #(.OUT_BITS(1)) dut1 (.clk, .rst, .in_valid, .x, .out_valid(ov1), .y_full(yf1), .y_q(yq1));

  always @(posedge clk) if (!rst && ov1) begin
    checks++;
    if (yq1[0] != (yf1 < 0)) begin
      failures++; $display("1-bit output %0d for %0d", yq1, yf1);
    end
    if (yq1[0]) n_neg1++;
  end

  always #1 clk = ~clk;
  always @(posedge clk) if (!rst && out_valid) begin
    int e;
    ys.push_back(int'(y_full));
    e = int'(y_full) >>> 5;
    if (e > 1) e = 1;
    if (e < -2) e = -2;
    if (e == 1 || e == -2) qsat++;
    checks++;
    if (int'(y_q) != e) begin failures++; $display("y_q %0d for %0d", y_q, y_full); end
  end

  task automatic send(int v);
    @(negedge clk); x = 13'(v); in_valid = 1'b1;
    @(negedge clk); in_valid = 1'b0;
  endtask

  function automatic real tone_amp(int base, int n0, int n1, real f);
    real c = 0.0, s = 0.0;
    for (int n = n0; n < n1; n++) begin
      c += ys[base + n] * $cos(2.0 * PI * f * n);
      s += ys[base + n] * $sin(2.0 * PI * f * n);
    end
    return 2.0 * $sqrt(c * c + s * s) / (n1 - n0);
  endfunction

  initial begin
    int base;
    real a;
    x = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    repeat (100) send(1000);
    repeat (3) @(negedge clk);
    checks++;
    if (ys[ys.size() - 1] < 998 || ys[ys.size() - 1] > 1002) begin failures++; $display("DC %0d", ys[ys.size()-1]); end
    base = ys.size();
    for (int n = 0; n < 256; n++) send(int'($floor(1000.0 * $cos(2.0 * PI * n / 32.0) + 0.5)));
    repeat (3) @(negedge clk);
    a = tone_amp(base, 96, 256, 1.0 / 32.0);
    checks++;
    if (a < 891.0 || a > 1122.0) begin failures++; $display("1 MHz amplitude %f", a); end
    base = ys.size();
    for (int n = 0; n < 256; n++) send(int'($floor(1000.0 * $cos(2.0 * PI * n * 6.0 / 32.0) + 0.5)));
    repeat (3) @(negedge clk);
    a = tone_amp(base, 96, 256, 6.0 / 32.0);
    checks++;
    if (a > 31.6) begin failures++; $display("6 MHz amplitude %f", a); end
    checks++;
    if (n_neg1 == 0) begin failures++; $display("1-bit output never negative"); end
    checks++;
    if (qsat == 0) begin failures++; $display("quantiser never saturated"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
