// scale_data -- restores unity gain after the transposed Farrow filter.
//
// The transposed Farrow filter has a gain of R; integrate_dump already
// divided by 2^D (D = ceil(log2 R)), so the remaining factor is
// S = 2^D / R in [1, 2), supplied from outside as unsigned Q1.17. LANES
// parallel 27 x 18 bit multipliers form out_farrow * S (Q3.42); the product is
// truncated (rounded with ROUNDING = RND_ALL) to Q2.22 and saturated to the
// HB_W-bit halfband input. Each output register loads only when farrow_valid
// is high and holds otherwise; scaled_valid is farrow_valid delayed one
// clock. Latency 1 clock.
// Function and the hold multiplexers follow the source design; the word
// lengths are this design's own.
module scale_data
  import decim_pkg::*;
#(
  parameter int unsigned LANES = 8,
  parameter int          ROUNDING = RND_LAST
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   farrow_valid,
  input  scale_t scale_factor,
  input  f_t     out_farrow  [LANES],
  output hb_t    scaled_data [LANES],
  output logic   scaled_valid
);
  localparam int unsigned PR_W = F_W + S_W + 1;
  typedef logic signed [PR_W-1:0] prod_t;

  prod_t prod [LANES];

  always_comb begin
    for (int i = 0; i < int'(LANES); i++)
      prod[i] = prod_t'(out_farrow[i]) * prod_t'({1'b0, scale_factor});
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      scaled_valid <= 1'b0;
      for (int i = 0; i < int'(LANES); i++) scaled_data[i] <= '0;
    end else begin
      scaled_valid <= farrow_valid;
      if (farrow_valid)
        for (int i = 0; i < int'(LANES); i++)
          scaled_data[i] <= hb_t'(sat(rshift(64'(prod[i]), 20, ROUNDING == RND_ALL), HB_W));
    end
  end
endmodule
