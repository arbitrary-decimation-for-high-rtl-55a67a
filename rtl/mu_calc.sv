// mu_calc -- parallel iterative computation of the fractional interval mu.
//
// For every input sample k the transposed Farrow structure needs
//   mu_k = frac(mu_{k-1} + 1/R)
// and a flag telling whether the addition carried over 1 (an output instant
// lies between samples k-1 and k: the integrate-and-dump stage must dump its
// sum and restart at sample k). With LANES samples per clock a chain of LANES
// dependent additions would be too slow, so lane i adds the multiple
// (i+1)/R to the mu carried over from the previous clock; all lanes are
// independent adders. The multiples are formed one clock earlier (shifts and
// one add each) and registered, since r_inverse is a static setting.
// The sums keep only the fraction bits plus a few integer bits; lane i
// overflows when its integer part differs from that of lane i-1.
//
// Interface: r_inverse = 1/R in unsigned Q1.16 (R >= 1), must be stable for at
// least one clock before rst is released. Outputs mu[i] (Q0.16) and
// overflow[i] are registered: the word produced at the first clock edge with
// rst low belongs to samples k = 1..LANES, with mu_k = frac(k/R) and
// overflow_k = floor(k/R) - floor((k-1)/R).
// The carry-as-dump-flag and the multiples-of-1/R trick follow the source
// design; the exact register placement is this design's own.
module mu_calc
  import decim_pkg::*;
#(
  parameter int unsigned LANES = 8
) (
  input  logic              clk,
  input  logic              rst,
  input  rinv_t             r_inverse,
  output mu_t               mu       [LANES],
  output logic [LANES-1:0]  overflow
);
  localparam int unsigned IW = $clog2(LANES + 1) + 1;   // integer bits of the sums
  localparam int unsigned SW = MU_W + IW;
  typedef logic [SW-1:0] sum_t;

  sum_t mult [LANES];      // registered (i+1) * r_inverse
  mu_t  mu_acc;            // mu of the last sample of the previous clock
  sum_t s    [LANES];

  always_ff @(posedge clk) begin
    for (int i = 0; i < int'(LANES); i++)
      mult[i] <= sum_t'(r_inverse) * sum_t'(i + 1);
  end

  always_comb begin
    for (int i = 0; i < int'(LANES); i++)
      s[i] = sum_t'(mu_acc) + mult[i];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      mu_acc   <= '0;
      overflow <= '0;
      for (int i = 0; i < int'(LANES); i++) mu[i] <= '0;
    end else begin
      mu_acc <= s[LANES-1][MU_W-1:0];
      for (int i = 0; i < int'(LANES); i++) begin
        mu[i] <= s[i][MU_W-1:0];
        if (i == 0) overflow[i] <= s[0][SW-1:MU_W] != '0;
        else        overflow[i] <= s[i][SW-1:MU_W] != s[i-1][SW-1:MU_W];
      end
    end
  end
endmodule
