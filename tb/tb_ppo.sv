// tb_ppo: checks the parallel pre-computed oscillator against a serial phase
// accumulator: after loading phi0 + i*inc into slot i, slot i of block b must hold
// the truncated phase of sample 16*b + i. Two LO settings are tried, and blocks are
// advanced at irregular times.
module tb_ppo;
  localparam int PW = 14, LW = 6;
  logic clk = 1'b0, rst = 1'b1;
  logic load = 1'b0, advance = 1'b0;
  logic [PW-1:0] inc, init [16];
  logic [LW-1:0] phase [16];
  int checks = 0, failures = 0;

  ppo dut (.clk, .rst, .load, .inc, .init, .advance, .phase);

  always #1 clk = ~clk;

  task automatic run(int unsigned phi0, int unsigned f_inc, int nblocks);
    longint unsigned serial;
    @(negedge clk);
    inc = PW'(f_inc);
    for (int i = 0; i < 16; i++) init[i] = PW'(phi0 + i * f_inc);
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    for (int b = 0; b < nblocks; b++) begin
      repeat ($urandom_range(0, 3)) @(negedge clk);
      for (int i = 0; i < 16; i++) begin
        serial = (longint'(phi0) + longint'(f_inc) * (16 * b + i)) % (1 << PW);
        checks++;
        if (phase[i] != LW'(serial >> (PW - LW))) begin
          failures++;
          $display("block %0d slot %0d got %0d exp %0d", b, i, phase[i], serial >> (PW - LW));
        end
      end
      advance = 1'b1;
      @(negedge clk);
      advance = 1'b0;
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    run(0, 1600, 50);         // 100 MHz at 1.024 GS/s
    run(12345, 3217, 50);     // arbitrary phase and frequency
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
