// farrow_filter -- the coefficient part of the transposed Farrow filter for
// one lane of a word.
//
// For the NBR branch values v[m] of one output interval it forms, for each of
// the NTAP tap levels n, the sum over the branches
//   p[n] = sum_m c_m(n) * v[m]          (coefficients from decim_pkg)
// The symmetry c_m(NTAP-1-n) = (-1)^m c_m(n) is used: only the products of
// the first NTAP/2 levels are computed (27 x 16 bit), the others are their
// negations for odd m. Two register stages, both enabled by en (acc_valid):
// products, then the branch sums truncated from Q3.40 to Q5.25 (P_W bits),
// or rounded with ROUNDING = RND_ALL.
// The delays and additions across tap levels happen in farrow_top.
// Function, coefficients and use of symmetry follow the source design; the
// pipelining and word lengths are this design's own.
module farrow_filter
  import decim_pkg::*;
#(
  parameter int ROUNDING = RND_LAST
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  v_t   v [NBR],
  output p_t   p [NTAP]
);
  localparam int unsigned PR_W = V_W + COEF_W;       // 43-bit product, Q3.40
  typedef logic signed [PR_W-1:0]   prod_t;
  typedef logic signed [PR_W+2:0]   psum_t;

  prod_t prod [NBR][NTAP/2];
  psum_t sum  [NTAP];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int m = 0; m < int'(NBR); m++)
        for (int n = 0; n < int'(NTAP/2); n++) prod[m][n] <= '0;
    end else if (en) begin
      for (int m = 0; m < int'(NBR); m++)
        for (int n = 0; n < int'(NTAP/2); n++)
          prod[m][n] <= v[m] * farrow_coef(m, n);
    end
  end

  always_comb begin
    for (int n = 0; n < int'(NTAP); n++) begin
      sum[n] = '0;
      for (int m = 0; m < int'(NBR); m++) begin
        if (n < int'(NTAP/2))   sum[n] = sum[n] + psum_t'(prod[m][n]);
        else if (m % 2 == 0)    sum[n] = sum[n] + psum_t'(prod[m][NTAP-1-n]);
        else                    sum[n] = sum[n] - psum_t'(prod[m][NTAP-1-n]);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int n = 0; n < int'(NTAP); n++) p[n] <= '0;
    end else if (en) begin
      for (int n = 0; n < int'(NTAP); n++)
        p[n] <= p_t'(rshift(64'(sum[n]), COEF_W - 1, ROUNDING == RND_ALL));
    end
  end
endmodule
