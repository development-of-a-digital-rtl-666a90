// tb_sideband_adder: random and extreme inputs; usb must be i + q and lsb i - q,
// one clock after the strobe, with no overflow.
module tb_sideband_adder;
  logic clk = 1'b0, rst = 1'b1;
  logic in_valid = 1'b0, out_valid;
  logic signed [11:0] i_d, q_h;
  logic signed [12:0] usb, lsb;
  int checks = 0, failures = 0;

  sideband_adder dut (.clk, .rst, .in_valid, .i_d, .q_h, .out_valid, .usb, .lsb);

  always #1 clk = ~clk;

  initial begin
    i_d = '0; q_h = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      case (t % 50)
        0: begin i_d = 12'sd2047;  q_h = 12'sd2047;  end
        1: begin i_d = -12'sd2048; q_h = 12'sd2047;  end
        2: begin i_d = -12'sd2048; q_h = -12'sd2048; end
        default: begin i_d = 12'($urandom); q_h = 12'($urandom); end
      endcase
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      checks += 3;
      if (!out_valid) begin failures++; $display("no strobe"); end
      if (int'(usb) != int'(i_d) + int'(q_h)) begin failures++; $display("usb %0d for %0d %0d", usb, i_d, q_h); end
      if (int'(lsb) != int'(i_d) - int'(q_h)) begin failures++; $display("lsb %0d for %0d %0d", lsb, i_d, q_h); end
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
