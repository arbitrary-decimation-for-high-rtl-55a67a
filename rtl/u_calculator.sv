// u_calculator -- forms u_m = x * (2mu - 1)^m, m = 0..NBR-1, for one lane.
//
// The control value c = 2mu - 1 is mu (unsigned Q0.16) with its MSB inverted,
// read as signed Q1.15. The input sample is widened to Q1.26 (u_0) and
// multiplied by c NBR-1 times in a chain of registered multipliers (27 x 16
// bit, the size of one DSP slice); each product is truncated back to Q1.26
// and saturated (only (-1)*(-1) can overflow). Registers carry the earlier
// products along so that all NBR outputs of one sample leave together,
// U_LAT = NBR clock cycles after x and mu are presented; one sample per clock.
// The chained multiplication and the aligned outputs follow the source design;
// the formats, truncation (or rounding, ROUNDING = RND_ALL) and saturation
// are this design's own.
module u_calculator
  import decim_pkg::*;
#(
  parameter int ROUNDING = RND_LAST
) (
  input  logic    clk,
  input  sample_t x,
  input  mu_t     mu,
  output u_t      u [NBR]
);
  // pipe[s][m]: stage s holds u_0..u_s of one sample; cpipe[s] its c.
  u_t pipe  [NBR][NBR];
  c_t cpipe [NBR];

  function automatic u_t mul_c(input u_t a, input c_t c);
    logic signed [U_W+C_W-1:0] prod;
    prod = a * c;                                        // Q2.41
    return u_t'(sat(rshift(64'(prod), C_W-1, ROUNDING == RND_ALL), U_W));  // Q1.26
  endfunction

  always_ff @(posedge clk) begin
    for (int m = 0; m < int'(NBR); m++) pipe[0][m] <= '0;
    pipe[0][0] <= u_t'({x, {(U_W-DATA_W){1'b0}}});
    cpipe[0]   <= c_t'({~mu[MU_W-1], mu[MU_W-2:0]});
    for (int s = 1; s < int'(NBR); s++) begin
      for (int m = 0; m < int'(NBR); m++) pipe[s][m] <= pipe[s-1][m];
      pipe[s][s] <= mul_c(pipe[s-1][s-1], cpipe[s-1]);
      cpipe[s]   <= cpipe[s-1];
    end
  end

  assign u = pipe[NBR-1];
endmodule
