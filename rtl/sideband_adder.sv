// sideband_adder: forms the two sidebands from the aligned I and Hilbert-filtered Q.
//
// usb = i_d + q_h and lsb = i_d - q_h, one bit wider than the inputs so nothing
// overflows. Registered: one clock from in_valid to out_valid. The sum and
// difference and which output is which sideband follow the prototype's block
// diagram.
module sideband_adder #(
  parameter int W = 12
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic signed [W-1:0] i_d,
  input  logic signed [W-1:0] q_h,
  output logic                out_valid,
  output logic signed [W:0]   usb,
  output logic signed [W:0]   lsb
);
  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      usb       <= '0;
      lsb       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        usb <= (W+1)'(i_d) + (W+1)'(q_h);
        lsb <= (W+1)'(i_d) - (W+1)'(q_h);
      end
    end
  end
endmodule
