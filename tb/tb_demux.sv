// tb_demux: checks that the demux groups eight consecutive sample pairs into one
// 16-sample block, earliest sample in lane 0, with a strobe exactly every 8 clocks.
module tb_demux;
  logic clk = 1'b0, rst = 1'b1;
  logic signed [3:0] din [2];
  logic out_valid;
  logic signed [3:0] dout [16];
  int checks = 0, failures = 0;

  demux dut (.clk, .rst, .din, .out_valid, .dout);

  always #1 clk = ~clk;

  logic signed [3:0] hist [$];
  int last_valid = -1, cyc = 0, blocks = 0;

  initial begin
    din[0] = '0; din[1] = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int c = 0; c < 8 * 40; c++) begin
      @(negedge clk);
      din[0] = 4'($urandom); din[1] = 4'($urandom);
      hist.push_back(din[0]); hist.push_back(din[1]);
    end
    repeat (2) @(negedge clk);
    if (blocks != 40) begin failures++; $display("blocks %0d", blocks); end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    cyc++;
    if (out_valid) begin
      checks++;
      for (int k = 0; k < 16; k++)
        if (dout[k] !== hist[blocks * 16 + k]) begin
          failures++;
          $display("block %0d lane %0d got %0d exp %0d", blocks, k, dout[k], hist[blocks*16+k]);
          break;
        end
      if (last_valid >= 0) begin
        checks++;
        if (cyc - last_valid != 8) begin failures++; $display("strobe spacing %0d", cyc - last_valid); end
      end
      last_valid = cyc;
      blocks++;
    end
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
