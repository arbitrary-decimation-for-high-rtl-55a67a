// u_calc_top -- LANES parallel u_calculator instances.
//
// Lane i turns input sample x[i] and its mu[i] into the NBR branch inputs
// u[m][i] = x[i] * (2mu[i] - 1)^m, m = 0..NBR-1. Throughput one word of LANES
// samples per clock, latency U_LAT clock cycles, all outputs aligned.
module u_calc_top
  import decim_pkg::*;
#(
  parameter int unsigned LANES    = 8,
  parameter int          ROUNDING = RND_LAST
) (
  input  logic    clk,
  input  sample_t x  [LANES],
  input  mu_t     mu [LANES],
  output u_t      u  [NBR][LANES]
);
  for (genvar i = 0; i < int'(LANES); i++) begin : g_lane
    u_t ul [NBR];
    u_calculator #(.ROUNDING(ROUNDING)) u_calc (.clk(clk), .x(x[i]), .mu(mu[i]), .u(ul));
    for (genvar m = 0; m < int'(NBR); m++) begin : g_br
      assign u[m][i] = ul[m];
    end
  end
endmodule
