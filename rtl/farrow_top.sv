// farrow_top -- LANES-parallel transposed Farrow filter (output-rate part).
//
// The transposed Farrow output is
//   y(l) = sum_{n=0}^{NTAP-1} p(l-NTAP+1+n, n),  p(l, n) = sum_m c_m(n) v_m(l)
// i.e. the delay chain of the transposed FIR runs at the output rate. One
// farrow_filter per lane computes p(l, n) for the interval l in its lane.
// Lane i of the output needs level n of the interval i-NTAP+1+n: from the
// current word if that index is >= 0, otherwise from the previous word,
// which a one-word delay register ("D") holds for every lane. The NTAP terms
// per output are added in a registered adder tree of log2(NTAP) levels
// (7 additions in 3 steps for NTAP = 8) and saturated to F_W bits (Q2.25).
// Every register advances only on acc_valid, so the filter runs at the
// decimated rate; set_valid_out raises farrow_valid after the pipeline has
// filled. Requires LANES >= NTAP - 1. Output lane 0 is the oldest sample.
// Structure as in the source design; tree word lengths are this design's own.
module farrow_top
  import decim_pkg::*;
#(
  parameter int unsigned LANES    = 8,
  parameter int          ROUNDING = RND_LAST
) (
  input  logic clk,
  input  logic rst,
  input  logic acc_valid,
  input  v_t   v [NBR][LANES],
  output f_t   out_farrow [LANES],
  output logic farrow_valid
);
  localparam int unsigned LV  = $clog2(NTAP);
  localparam int unsigned TW  = P_W + LV;
  typedef logic signed [TW-1:0] t_t;

  p_t p      [LANES][NTAP];
  p_t p_prev [LANES][NTAP];
  t_t term   [LANES][NTAP];
  // tree[k][i][j]: level k (0 = terms) of output i, node j
  t_t tree   [LV+1][LANES][NTAP];

  for (genvar j = 0; j < int'(LANES); j++) begin : g_lane
    v_t vl [NBR];
    for (genvar m = 0; m < int'(NBR); m++) begin : g_br
      assign vl[m] = v[m][j];
    end
    farrow_filter #(.ROUNDING(ROUNDING)) u_ff (.clk, .rst, .en(acc_valid), .v(vl), .p(p[j]));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int j = 0; j < int'(LANES); j++)
        for (int n = 0; n < int'(NTAP); n++) p_prev[j][n] <= '0;
    end else if (acc_valid) begin
      p_prev <= p;
    end
  end

  always_comb begin
    for (int i = 0; i < int'(LANES); i++)
      for (int n = 0; n < int'(NTAP); n++) begin
        int idx;
        idx = i - int'(NTAP) + 1 + n;
        term[i][n] = (idx >= 0) ? t_t'(p[idx][n]) : t_t'(p_prev[idx + int'(LANES)][n]);
      end
    tree[0] = term;
  end

  for (genvar k = 1; k <= int'(LV); k++) begin : g_lvl
    always_ff @(posedge clk) begin
      if (rst) begin
        for (int i = 0; i < int'(LANES); i++)
          for (int j = 0; j < int'(NTAP); j++) tree[k][i][j] <= '0;
      end else if (acc_valid) begin
        for (int i = 0; i < int'(LANES); i++)
          for (int j = 0; j < int'(NTAP >> k); j++)
            tree[k][i][j] <= tree[k-1][i][2*j] + tree[k-1][i][2*j+1];
      end
    end
  end

  always_comb begin
    for (int i = 0; i < int'(LANES); i++)
      out_farrow[i] = f_t'(sat(64'(tree[LV][i][0]), F_W));
  end

  set_valid_out #(.FILL(6)) u_valid (.clk, .rst, .acc_valid, .farrow_valid);
endmodule
