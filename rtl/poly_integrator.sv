// poly_integrator: the integrator half of the CIC filter, evaluated sixteen samples
// at a time.
//
// A CIC integrator cascade s_k[t] = s_k[t-1] + s_{k-1}[t] (s_0 = input, k = 1..N)
// would have to run at 1.024 GS/s. Here all N states advance once per 64 MHz block of
// LANES samples. Unrolling the recursion over a block gives, for every state, a fixed
// polynomial (binomial) weighting of the old states and of the new samples:
//   s_k' = sum_{j<=k} C(L+k-j-1, k-j) s_j  +  sum_i C(k-1+L-1-i, k-1) x_i
// The sample part is formed by distributed arithmetic: the lanes are split in groups
// of GROUP, and for every bit plane of the IN_W-bit two's complement samples the
// GROUP bits address a table holding the sum of the weights of the lanes whose bit
// is set. The planes are added with weights 2^b (the sign plane negatively) and the
// two group results summed. All tables are filled at elaboration.
//
// The arithmetic is modulo 2^ACC_W, which is exact for the CIC output as long as
// ACC_W >= IN_W + N*log2(R*M) (84 bits for N = 16, R = 32, M = 1). The output y is
// state s_N after the last sample of each block, one clock after in_valid. Splitting
// the lanes into two LUT groups of eight follows the prototype; the exact state-space
// formulation and the distributed-arithmetic tables are this design's reading of its
// "polynomial calculation performed with an LUT".
module poly_integrator
  import dbbc_pkg::*;
#(
  parameter int LANES = 16,
  parameter int IN_W  = 4,
  parameter int CIC_N = 16,
  parameter int ACC_W = 84,
  parameter int GROUP = 8
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  x [LANES],
  output logic                    out_valid,
  output logic [ACC_W-1:0]        y
);
  localparam int NG = LANES / GROUP;
  // Largest table entry: GROUP times the largest weight, that of state N.
  localparam longint DA_MAX = GROUP * cic_w(CIC_N, 0, LANES);
  localparam int     DA_W   = $clog2(DA_MAX + 1);

  typedef logic [DA_W-1:0] da_tbl_t [2**GROUP];

  function automatic da_tbl_t make_tbl(int k, int g);
    da_tbl_t t;
    for (int a = 0; a < 2**GROUP; a++) t[a] = DA_W'(da_entry(k, g, a, GROUP, LANES));
    return t;
  endfunction

  logic [ACC_W-1:0] s   [1:CIC_N];
  logic [ACC_W-1:0] nxt [1:CIC_N];

  for (genvar k = 1; k <= CIC_N; k++) begin : g_k
    // Sample part: distributed arithmetic over each group and bit plane.
    logic [ACC_W-1:0] da_sum [NG];
    for (genvar g = 0; g < NG; g++) begin : g_g
      localparam da_tbl_t TBL = make_tbl(k, g);
      logic [DA_W-1:0]  term [IN_W];
      logic [GROUP-1:0] addr [IN_W];
      for (genvar b = 0; b < IN_W; b++) begin : g_b
        for (genvar j = 0; j < GROUP; j++) begin : g_bit
          assign addr[b][j] = x[g * GROUP + j][b];
        end
        assign term[b] = TBL[addr[b]];
      end
      always_comb begin
        da_sum[g] = '0;
        for (int b = 0; b < IN_W; b++)
          if (b == IN_W - 1) da_sum[g] = da_sum[g] - (ACC_W'(term[b]) << b);
          else               da_sum[g] = da_sum[g] + (ACC_W'(term[b]) << b);
      end
    end

    // State part: constant binomial weights of the states j <= k.
    logic [ACC_W-1:0] fb [1:k];
    for (genvar j = 1; j <= k; j++) begin : g_j
      localparam longint G = cic_g(k, j, LANES);
      assign fb[j] = s[j] * ACC_W'(G);
    end

    always_comb begin
      nxt[k] = '0;
      for (int j = 1; j <= k; j++) nxt[k] = nxt[k] + fb[j];
      for (int g = 0; g < NG; g++) nxt[k] = nxt[k] + da_sum[g];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      for (int k = 1; k <= CIC_N; k++) s[k] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        for (int k = 1; k <= CIC_N; k++) s[k] <= nxt[k];
    end
  end

  assign y = s[CIC_N];

  initial assert (LANES % GROUP == 0) else $error("LANES must be a multiple of GROUP");
endmodule
