// integrate_dump -- the accumulator in front of one transposed Farrow branch.
//
// Each clock brings LANES values u[i] and their dump flags ov[i]. Every value
// is first divided by 2^(shift+1) by an arithmetic shift (2^shift = 2^D, the
// power of two at or above R, keeps the sum of up to R values within range;
// the extra bit moves u from Q1.26 to the Q2.25 accumulator format). The
// values are summed in sample order; where ov[i] is set the running sum
// (samples up to i-1) is dumped to v_u[i] and the accumulation restarts with
// sample i. Positions without a flag carry an intermediate value that later
// stages ignore. The sum of the last open interval is carried to the next
// clock. Registered outputs, latency 1; en = 0 holds everything.
// The sum is kept with V_G = 6 guard bits (Q2.31), so the shift by up to
// D+1 = 17 loses no bit of the 16-bit input sample; the dumped sum is cut
// back to Q2.25 once. With ROUNDING = RND_ALL both reductions round.
// Dump-on-overflow and the shift by D follow the source design; the order
// convention (a flag on sample i closes the interval before i) is derived from
// the definition of mu as the distance to the latest output instant.
module integrate_dump
  import decim_pkg::*;
#(
  parameter int unsigned LANES = 8,
  parameter int          ROUNDING = RND_LAST
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  shift_t           shift,
  input  u_t               u   [LANES],
  input  logic [LANES-1:0] ov,
  output v_t               v_u [LANES]
);
  vacc_t acc;
  vacc_t run [LANES+1];
  vacc_t t   [LANES];
  v_t    dmp [LANES];
  logic signed [VA_W:0] half, dhalf;

  // half an LSB of the shifted value and of the dumped sum, added only when
  // every step rounds
  assign half  = (ROUNDING == RND_ALL) ? (VA_W+1)'(1) <<< shift : '0;
  assign dhalf = (ROUNDING == RND_ALL) ? (VA_W+1)'(1) <<< (V_G - 1) : '0;

  always_comb begin
    run[0] = acc;
    for (int i = 0; i < int'(LANES); i++) begin
      t[i]   = vacc_t'((((VA_W+1)'(u[i]) <<< V_G) + half) >>> (int'(shift) + 1));
      dmp[i] = v_t'(((VA_W+1)'(run[i]) + dhalf) >>> V_G);
      run[i+1] = ov[i] ? t[i] : vacc_t'(run[i] + t[i]);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc <= '0;
      for (int i = 0; i < int'(LANES); i++) v_u[i] <= '0;
    end else if (en) begin
      acc <= run[LANES];
      for (int i = 0; i < int'(LANES); i++) v_u[i] <= dmp[i];
    end
  end
endmodule
