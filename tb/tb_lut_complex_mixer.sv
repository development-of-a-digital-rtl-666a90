// tb_lut_complex_mixer: checks every lane's I and Q product against a real-valued
// reference round(x*sin) and round(x*cos), clipped to 4 bits, for random samples and
// phases, and checks the one-clock latency.
module tb_lut_complex_mixer;
  logic clk = 1'b0, rst = 1'b1;
  logic in_valid = 1'b0, out_valid;
  logic signed [3:0] x [16];
  logic [5:0] phase [16];
  logic signed [3:0] i_out [16], q_out [16];
  int checks = 0, failures = 0;

  lut_complex_mixer dut (.clk, .rst, .in_valid, .x, .phase, .out_valid, .i_out, .q_out);

  always #1 clk = ~clk;

  function automatic int ref_prod(int xv, int p, bit c);
    real a = 2.0 * 3.141592653589793 * p / 64.0;
    real v = xv * (c ? $cos(a) : $sin(a));
    int r = (v >= 0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
    if (r > 7) r = 7;
    if (r < -8) r = -8;
    return r;
  endfunction

  initial begin
    for (int l = 0; l < 16; l++) begin x[l] = '0; phase[l] = '0; end
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      for (int l = 0; l < 16; l++) begin x[l] = 4'($urandom); phase[l] = 6'($urandom); end
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      checks++;
      if (!out_valid) begin failures++; $display("no out_valid one clock after in_valid"); end
      for (int l = 0; l < 16; l++) begin
        checks += 2;
        if (i_out[l] != 4'(ref_prod(x[l], phase[l], 0))) begin
          failures++; $display("I x=%0d p=%0d got %0d", x[l], phase[l], i_out[l]);
        end
        if (q_out[l] != 4'(ref_prod(x[l], phase[l], 1))) begin
          failures++; $display("Q x=%0d p=%0d got %0d", x[l], phase[l], q_out[l]);
        end
      end
    end
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
