// accumulate_top -- front end of the transposed Farrow decimator.
//
// Runs at the input rate, LANES samples per clock, and is the only part of
// the design that sees the variable rate: it turns it into complete LANES-wide
// words per Farrow branch, flagged by acc_valid, so everything after it is
// simply data driven.
//   mu_calc        mu_k and the dump flags from r_inverse = 1/R
//   u_calc_top     u_m = x (2mu-1)^m for the NBR branches (U_LAT clocks)
//   integrate_dump one per branch; divides by 2^(shift+1), sums per interval
//   sort_samples   packing control from the (delayed) dump flags
//   select_samples one per branch; packs the dumped sums into words v[m]
// The input word is registered once (as mu_calc's output is) so that each
// sample meets its own mu; the dump flags and a 'live' bit (low until the
// first word after reset reaches the accumulators) are delayed by U_LAT to
// meet the u values. The first word sampled after rst falls is samples
// 1..LANES of the stream. v[m][i], i = 0 oldest, is the sum over output
// interval l of x_k (2mu_k - 1)^m / 2^(D+1) (Q2.25); acc_valid marks a word.
// Structure as in the source design; the delay lengths follow from this
// design's own pipeline (the source used 1, 7, 11 and 12 clock delays).
module accumulate_top
  import decim_pkg::*;
#(
  parameter int unsigned LANES    = 8,
  parameter int          ROUNDING = RND_LAST
) (
  input  logic    clk,
  input  logic    rst,
  input  sample_t signal [LANES],
  input  rinv_t   r_inverse,
  input  shift_t  shift,
  output v_t      v [NBR][LANES],
  output logic    acc_valid
);
  localparam int unsigned LW = $clog2(LANES);

  sample_t          sig_q [LANES];
  mu_t              mu    [LANES];
  logic [LANES-1:0] overflow;
  logic             live;
  u_t               u     [NBR][LANES];
  logic [LANES-1:0] ov_d;
  logic             live_d;
  logic [LANES-1:0] overflow_sorted;
  logic [LW-1:0]    select [LANES];
  logic             select_valid;
  logic [NBR-1:0]   br_valid;

  always_ff @(posedge clk) begin
    sig_q <= signal;
    live  <= !rst;
  end

  mu_calc #(.LANES(LANES)) u_mu (
    .clk, .rst, .r_inverse, .mu, .overflow
  );

  u_calc_top #(.LANES(LANES), .ROUNDING(ROUNDING)) u_ucalc (.clk, .x(sig_q), .mu, .u);

  delay_line #(.WIDTH(LANES + 1), .DEPTH(U_LAT)) u_ov_dly (
    .clk, .rst, .d({live & !rst, overflow}), .q({live_d, ov_d})
  );

  sort_samples #(.LANES(LANES)) u_sort (
    .clk, .rst, .en(live_d), .overflow(ov_d),
    .overflow_sorted, .select, .select_valid
  );

  for (genvar m = 0; m < int'(NBR); m++) begin : g_branch
    v_t v_u [LANES];
    integrate_dump #(.LANES(LANES), .ROUNDING(ROUNDING)) u_id (
      .clk, .rst, .en(live_d), .shift, .u(u[m]), .ov(ov_d), .v_u
    );
    select_samples #(.LANES(LANES)) u_sel (
      .clk, .rst, .v_u, .overflow_sorted, .select, .select_valid,
      .v_sorted(v[m]), .valid_out(br_valid[m])
    );
  end

  // All branches are packed by the same control and complete together.
  assign acc_valid = &br_valid;
endmodule
