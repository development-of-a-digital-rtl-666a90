// tb_poly_integrator: runs a serial 16-stage integrator cascade, one sample at a
// time at the full input rate, beside the block-parallel integrator, and compares
// the last stage after every block of 16 samples (84-bit wrapping arithmetic).
// Random samples, full-scale runs and gaps between blocks are applied.
module tb_poly_integrator;
  localparam int N = 16, W = 84;
  logic clk = 1'b0, rst = 1'b1;
  logic in_valid = 1'b0, out_valid;
  logic signed [3:0] x [16];
  logic [W-1:0] y;
  logic [W-1:0] s [1:N];
  int checks = 0, failures = 0;

  poly_integrator dut (.clk, .rst, .in_valid, .x, .out_valid, .y);

  always #1 clk = ~clk;

  initial begin
    for (int k = 1; k <= N; k++) s[k] = '0;
    for (int l = 0; l < 16; l++) x[l] = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int b = 0; b < 300; b++) begin
      @(negedge clk);
      for (int l = 0; l < 16; l++) begin
        if (b < 100)      x[l] = 4'($urandom);
        else if (b < 150) x[l] = -4'sd8;
        else if (b < 200) x[l] = 4'sd7;
        else              x[l] = 4'($urandom);
        // serial reference: s_k[t] = s_k[t-1] + s_{k-1}[t]
        s[1] = s[1] + W'(x[l]);
        for (int k = 2; k <= N; k++) s[k] = s[k] + s[k-1];
      end
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      checks += 2;
      if (!out_valid) begin failures++; $display("no out_valid"); end
      if (y != s[N]) begin failures++; $display("block %0d got %h exp %h", b, y, s[N]); end
      repeat ($urandom_range(0, 2)) @(negedge clk);
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
