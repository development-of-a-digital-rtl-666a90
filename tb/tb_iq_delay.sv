// tb_iq_delay: checks that each strobed sample comes out 31 samples later, two
// clocks after the strobe of the sample that pushes it out (the Hilbert filter's
// pipeline).
module tb_iq_delay;
  logic clk = 1'b0, rst = 1'b1;
  logic in_valid = 1'b0, out_valid;
  logic signed [11:0] x, y;
  int xs [$];
  int in_time [$];
  int checks = 0, failures = 0, cyc = 0, nout = 0;

  iq_delay dut (.clk, .rst, .in_valid, .x, .out_valid, .y);

  always #1 clk = ~clk;

  initial begin
    x = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      in_valid = (t % 4 == 1);
      x = 12'($urandom);
      if (in_valid) begin xs.push_back(int'(x)); in_time.push_back(cyc); end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (4) @(negedge clk);
    checks++;
    if (nout != xs.size()) begin failures++; $display("outputs %0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    cyc++;
    if (out_valid) begin
      int e;
      e = (nout >= 31) ? xs[nout - 31] : 0;
      checks += 2;
      if (int'(y) != e) begin failures++; $display("n=%0d got %0d exp %0d", nout, y, e); end
      if (cyc - in_time[nout] != 3) begin failures++; $display("latency %0d", cyc - in_time[nout] - 1); end
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
