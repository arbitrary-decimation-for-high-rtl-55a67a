// decimation -- arbitrary-factor decimator for an 8-sample-per-clock stream.
//
// Reduces the sample rate of a stream arriving LANES samples per clock (2.5
// GSa/s at 312.5 MHz with LANES = 8) by 2R, where R >= 1 is any factor with
// 1/R representable in 16 fraction bits. Two stages:
//   accumulate_top + farrow_top : transposed Farrow filter, decimation by R
//                                  (6 branches, order 7, 16-bit coefficients)
//   scale_data                  : gain correction S = 2^D/R
//   halfband_top                : halfband filter, decimation by 2
// Settings (static; change them only while rst is high):
//   r_inverse    = round(2^16 / R)      unsigned Q1.16
//   shift        = D = ceil(log2 R)
//   scale_factor = round(2^17 * 2^D / R) unsigned Q1.17
// signal[i] are consecutive samples, lane 0 oldest, one word every clock,
// Q1.15. data_out[j] (Q1.15, lane 0 oldest) holds 4 output samples when
// out_valid is high; words come out at the average rate 1/(2R) of the input
// words. Everything after the accumulators is data driven: an output word
// only moves on when later input arrives (6 Farrow words plus 3 halfband
// words fill the pipeline at start).
// ROUNDING selects how word lengths are reduced: RND_TRUNC truncates
// everywhere, RND_LAST (default) rounds only the final 16-bit output, RND_ALL
// rounds at every reduction. The source design evaluated all three.
// Block structure and settings follow the source design; the number formats
// are in decim_pkg.
module decimation
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
  input  scale_t  scale_factor,
  output sample_t data_out [LANES/2],
  output logic    out_valid
);
  v_t   v [NBR][LANES];
  logic acc_valid, farrow_valid, scaled_valid;
  f_t   out_farrow  [LANES];
  hb_t  out_scaled  [LANES];

  accumulate_top #(.LANES(LANES), .ROUNDING(ROUNDING)) u_acc (
    .clk, .rst, .signal, .r_inverse, .shift, .v, .acc_valid
  );

  farrow_top #(.LANES(LANES), .ROUNDING(ROUNDING)) u_farrow (
    .clk, .rst, .acc_valid, .v, .out_farrow, .farrow_valid
  );

  scale_data #(.LANES(LANES), .ROUNDING(ROUNDING)) u_scale (
    .clk, .rst, .farrow_valid, .scale_factor, .out_farrow,
    .scaled_data(out_scaled), .scaled_valid
  );

  halfband_top #(.ROUNDING(ROUNDING)) u_hb (
    .clk, .rst, .scaled_valid, .scaled_data(out_scaled), .data_out, .out_valid
  );

  initial assert (LANES == 8) else $error("halfband_top is written for 8 lanes");
  initial assert (ROUNDING >= RND_TRUNC && ROUNDING <= RND_ALL) else $error("unknown ROUNDING %0d", ROUNDING);
endmodule
