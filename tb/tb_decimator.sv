// tb_decimator: checks that the first and then every second strobed input is passed
// on, one clock later, with irregular gaps between input strobes.
module tb_decimator;
  logic clk = 1'b0, rst = 1'b1;
  logic in_valid = 1'b0, out_valid;
  logic [83:0] din, dout;
  int checks = 0, failures = 0;
  logic [83:0] sent [$];
  int nin = 0, nout = 0;

  decimator dut (.clk, .rst, .in_valid, .din, .out_valid, .dout);

  always #1 clk = ~clk;

  initial begin
    din = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 2) != 0);
      din = {20'($urandom), 32'($urandom), 32'($urandom)};
      if (in_valid) begin
        if (nin % 2 == 0) sent.push_back(din);
        nin++;
      end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (2) @(negedge clk);
    checks++;
    if (nout != (nin + 1) / 2) begin failures++; $display("outputs %0d for %0d inputs", nout, nin); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic prev_keep = 1'b0;
  always @(posedge clk) if (!rst) begin
    // output must appear exactly one clock after a kept input
    checks++;
    if (out_valid != prev_keep) begin failures++; $display("strobe mismatch at %0t", $time); end
    prev_keep = in_valid && (nin % 2 == 1);   // nin already counted this input
    if (out_valid) begin
      checks++;
      if (dout != sent[nout]) begin failures++; $display("output %0d wrong", nout); end
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
