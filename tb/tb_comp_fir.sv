// tb_comp_fir: checks the compensator's impulse response [-a, 1+2a, -a], a = 16/24
// in Q12, its unit gain at DC, and that it lifts a tone at 1/16 of the output rate (the 2 MHz band edge) by
// the amount the 16-stage CIC loses there, to within 2 %. Last, 300 random full-range
// samples are compared bit for bit with a reference model of the filter: Q12 taps
// -2731, 9558, -2731, round half up, saturation to 12 bits.
module tb_comp_fir;
  logic clk = 1'b0, rst = 1'b1;
  logic in_valid = 1'b0, out_valid;
  logic signed [11:0] x, y;
  int ys [$];
  int checks = 0, failures = 0;

  comp_fir dut (.clk, .rst, .in_valid, .x, .out_valid, .y);

  always #1 clk = ~clk;
  always @(posedge clk) if (!rst && out_valid) ys.push_back(int'(y));

  task automatic send(int v);
    @(negedge clk); x = 12'(v); in_valid = 1'b1;
    @(negedge clk); in_valid = 1'b0;
  endtask

  initial begin
    real a, e, amp, droop;
    int base;
    x = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    a = 16.0 / 24.0;
    // impulse of height 512
    send(512); repeat (4) send(0);
    repeat (3) @(negedge clk);
    for (int k = 0; k < 3; k++) begin
      e = 512.0 * ((k == 1) ? 1.0 + 2.0 * a : -a);
      checks++;
      if ((ys[k] - e) > 1.0 || (e - ys[k]) > 1.0) begin failures++; $display("tap %0d got %0d exp %f", k, ys[k], e); end
    end
    // DC
    repeat (10) send(500);
    repeat (3) @(negedge clk);
    checks++;
    if (ys[ys.size() - 1] != 500) begin failures++; $display("DC got %0d", ys[ys.size()-1]); end
    // tone at f = 1/16: compensator gain must equal 1/CIC droop
    base = ys.size();
    for (int n = 0; n < 128; n++) send(int'($floor(400.0 * $cos(2.0 * 3.14159265 * n / 16.0) + 0.5)));
    repeat (3) @(negedge clk);
    amp = 0.0;
    for (int n = 64; n < 128; n++) amp += ys[base + n] * $cos(2.0 * 3.14159265 * (n - 1) / 16.0);
    amp = amp / 32.0;   // amplitude of the cosine component
    droop = $pow($sin(3.14159265 / 16.0) / (32.0 * $sin(3.14159265 / 16.0 / 32.0)), 16);
    checks++;
    if (amp * droop / 400.0 < 0.98 || amp * droop / 400.0 > 1.02) begin
      failures++; $display("tone gain %f, CIC droop %f", amp / 400.0, droop);
    end
    // random samples against the reference model
    begin
      int xs [$];
      longint acc, r;
      int ca, cb;
      ca = int'($floor(16.0 / 24.0 * 4096.0 + 0.5));
      cb = 4096 + 2 * ca;
      xs = '{0, 0};
      base = ys.size();
      send(0); send(0);
      for (int n = 0; n < 300; n++) begin
        int v;
        v = int'($urandom_range(4095)) - 2048;
        xs.push_back(v);
        send(v);
      end
      repeat (3) @(negedge clk);
      for (int n = 2; n < xs.size(); n++) begin
        acc = longint'(cb) * xs[n - 1] - longint'(ca) * (xs[n] + xs[n - 2]);
        r = (acc + 2048) >>> 12;
        if (r > 2047) r = 2047;
        if (r < -2048) r = -2048;
        checks++;
        if (longint'(ys[base + n]) != r) begin
          failures++;
          if (failures < 10) $display("random %0d got %0d exp %0d", n, ys[base + n], r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
