// tb_hilbert_fir: checks the Hilbert transformer's impulse response (zero centre and
// even offsets, antisymmetric odd offsets of sign -2/(pi n) before windowing) and its
// effect on a cosine at 1/8 of the sample rate: after the 31-sample group delay the
// output must be -sin of the input phase (+90 degrees) to within 3 % of full
// amplitude.
module tb_hilbert_fir;
  localparam int NT = 63, C = 31;
  localparam real PI = 3.141592653589793;
  logic clk = 1'b0, rst = 1'b1;
  logic in_valid = 1'b0, out_valid;
  logic signed [11:0] x, y;
  int ys [$];
  int checks = 0, failures = 0;

  hilbert_fir dut (.clk, .rst, .in_valid, .x, .out_valid, .y);

  always #1 clk = ~clk;
  always @(posedge clk) if (!rst && out_valid) ys.push_back(int'(y));

  task automatic send(int v);
    @(negedge clk); x = 12'(v); in_valid = 1'b1;
    @(negedge clk); in_valid = 1'b0;
  endtask

  initial begin
    int base;
    real err, maxerr;
    x = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    send(2000); repeat (NT) send(0);
    repeat (3) @(negedge clk);
    for (int m = 0; m <= C; m++) begin
      checks++;
      if (m % 2 == 0) begin
        if (ys[C + m] != 0 || ys[C - m] != 0) begin failures++; $display("even tap %0d nonzero", m); end
      end else begin
        // -2/(pi m) * 2000 * window: sign and antisymmetry
        if (ys[C + m] >= 0 || ys[C - m] != -ys[C + m]) begin
          failures++; $display("odd tap %0d: %0d %0d", m, ys[C + m], ys[C - m]);
        end
      end
    end
    checks++;
    if (ys[C + 1] > -1200 || ys[C + 1] < -1300) begin failures++; $display("tap c+1 = %0d", ys[C + 1]); end
    base = ys.size();
    for (int n = 0; n < 200; n++) send(int'($floor(1000.0 * $cos(2.0 * PI * n / 8.0) + 0.5)));
    repeat (3) @(negedge clk);
    maxerr = 0.0;
    for (int n = 100; n < 200; n++) begin
      err = ys[base + n] - (-1000.0 * $sin(2.0 * PI * (n - C) / 8.0));
      if (err < 0) err = -err;
      if (err > maxerr) maxerr = err;
    end
    checks++;
    if (maxerr > 30.0) begin failures++; $display("tone error %f", maxerr); end
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
