// tb_cic_comb: compares the 16-stage comb with its closed form, the 16th difference
// y[n] = sum_k (-1)^k C(16,k) x[n-k] (84-bit wrapping), and checks that each result
// leaves exactly 16 clocks after its input.
module tb_cic_comb;
  localparam int N = 16, W = 84;
  logic clk = 1'b0, rst = 1'b1;
  logic in_valid = 1'b0, out_valid;
  logic [W-1:0] din, dout;
  logic [W-1:0] xs [$];
  int in_time [$];
  int checks = 0, failures = 0, cyc = 0, nout = 0;

  cic_comb dut (.clk, .rst, .in_valid, .din, .out_valid, .dout);

  always #1 clk = ~clk;

  function automatic longint c(int n, int k);
    longint r = 1;
    for (int i = 0; i < k; i++) r = r * (n - i) / (i + 1);
    return r;
  endfunction

  function automatic logic [W-1:0] expected(int n);
    logic [W-1:0] acc = '0;
    for (int k = 0; k <= N; k++) begin
      logic [W-1:0] xv = (n - k >= 0) ? xs[n - k] : '0;
      if (k % 2 == 0) acc = acc + xv * W'(c(N, k));
      else            acc = acc - xv * W'(c(N, k));
    end
    return acc;
  endfunction

  initial begin
    din = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      in_valid = (t % 16 == 0);   // the 32 MS/s strobe in the 512 MHz clock
      din = {20'($urandom), 32'($urandom), 32'($urandom)};
      if (in_valid) begin xs.push_back(din); in_time.push_back(cyc); end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (20) @(negedge clk);
    checks++;
    if (nout != xs.size()) begin failures++; $display("outputs %0d inputs %0d", nout, xs.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    cyc++;
    if (out_valid) begin
      checks += 2;
      if (dout != expected(nout)) begin failures++; $display("sample %0d wrong", nout); end
      if (cyc - in_time[nout] != N + 1) begin failures++; $display("latency %0d", cyc - in_time[nout] - 1); end
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
