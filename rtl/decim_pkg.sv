// decim_pkg -- shared widths, number formats and filter coefficients of the
// arbitrary decimator (transposed Farrow filter followed by a halfband filter).
//
// Number formats (Qi.f = i integer bits including sign, f fraction bits):
//   input/output samples     16 bit Q1.15        (as in the source design)
//   r_inverse = 1/R          17 bit unsigned Q1.16 (16 fraction bits, the
//                            resolution implied by the rounded decimation
//                            factors of the reference test cases, e.g. 2^16/63)
//   mu                       16 bit unsigned Q0.16
//   2*mu-1                   16 bit signed  Q1.15 (mu with its MSB inverted)
//   u = x(2mu-1)^m           27 bit signed  Q1.26 (27 bits: widest DSP input)
//   v (integrate and dump)   27 bit signed  Q2.25 (accumulated as 33 bit
//                            Q2.31: 6 guard bits, cut back at the dump)
//   farrow tap partial sums  30 bit signed  Q5.25
//   farrow output            27 bit signed  Q2.25
//   scale factor S           18 bit unsigned Q1.17, S = 2^D / R in [1,2)
//   halfband input           24 bit signed  Q2.22 (96-bit FIFO word / 4)
//   filter coefficients      16 bit signed  Q1.15 (rounded as in the source)
// Every intermediate width other than 16, 27 and 24 bits is this design's own
// choice. How word lengths are reduced is a parameter of the modules that
// reduce them (ROUNDING): truncate everywhere (RND_TRUNC), round only the
// final output (RND_LAST, the default) or round every reduction (RND_ALL),
// the three variants the source design verified. Rounding is round half up.
package decim_pkg;

  localparam int unsigned DATA_W  = 16;
  localparam int unsigned RINV_W  = 17;
  localparam int unsigned MU_W    = 16;
  localparam int unsigned C_W     = 16;
  localparam int unsigned U_W     = 27;
  localparam int unsigned V_W     = 27;
  localparam int unsigned V_G     = 6;           // accumulator guard bits
  localparam int unsigned VA_W    = V_W + V_G;   // accumulator, Q2.31
  localparam int unsigned SHIFT_W = 5;
  localparam int unsigned COEF_W  = 16;
  localparam int unsigned P_W     = 30;
  localparam int unsigned F_W     = 27;
  localparam int unsigned S_W     = 18;
  localparam int unsigned HB_W    = 24;
  localparam int unsigned HB_ACC_W = 46;  // Q?.37 accumulator of the halfband

  // Farrow structure: 6 branches (subfilters) of order 7 (8 taps each).
  localparam int unsigned NBR  = 6;
  localparam int unsigned NTAP = 8;
  // Halfband: 49 taps, 24 non-zero odd-index taps + centre tap 0.5.
  localparam int unsigned HB_NODD = 24;
  // Pipeline latency of the u calculator (clock cycles).
  localparam int unsigned U_LAT = 6;

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic        [RINV_W-1:0] rinv_t;
  typedef logic        [MU_W-1:0]   mu_t;
  typedef logic signed [C_W-1:0]    c_t;
  typedef logic signed [U_W-1:0]    u_t;
  typedef logic signed [V_W-1:0]    v_t;
  typedef logic signed [VA_W-1:0]   vacc_t;
  typedef logic signed [P_W-1:0]    p_t;
  typedef logic signed [F_W-1:0]    f_t;
  typedef logic        [S_W-1:0]    scale_t;
  typedef logic signed [HB_W-1:0]   hb_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic        [SHIFT_W-1:0] shift_t;

  // Unique Farrow coefficients c_m(n), n = 0..3, m = 0..5, rounded to Q1.15
  // (round(c * 2^15)). The remaining taps follow from the symmetry
  // c_m(7-n) = (-1)^m c_m(n).
  localparam coef_t FARROW_C [4][NBR] = '{
    '{ -16'sd149,  -16'sd46,   16'sd197,   16'sd94,  -16'sd24,  16'sd24},
    '{  16'sd1075,  16'sd319, -16'sd1293, -16'sd580,  16'sd143, -16'sd33},
    '{ -16'sd4387, -16'sd1693, 16'sd4787,  16'sd2348,-16'sd301, -16'sd14},
    '{  16'sd19846, 16'sd20178,-16'sd3690, -16'sd4795, 16'sd180, 16'sd83}
  };

  function automatic coef_t farrow_coef(input int m, input int n);
    coef_t c;
    if (n < 4) c = FARROW_C[n][m];
    else begin
      c = FARROW_C[NTAP-1-n][m];
      if (m % 2 == 1) c = -c;
    end
    return c;
  endfunction

  // Halfband odd-index taps h[1], h[3], ..., h[23] in Q1.15 (round(h * 2^15));
  // h[47-k] = h[k] and the centre tap h[24] = 0.5.
  localparam coef_t HB_C [HB_NODD/2] = '{
    -16'sd6, 16'sd19, -16'sd44, 16'sd89, -16'sd163, 16'sd279,
    -16'sd452, 16'sd711, -16'sd1113, 16'sd1800, -16'sd3298, 16'sd10370
  };

  // Coefficient of odd tap h[2i+1], i = 0..23.
  function automatic coef_t hb_coef(input int i);
    return (i < HB_NODD/2) ? HB_C[i] : HB_C[HB_NODD-1-i];
  endfunction

  // Rounding of the word-length reductions (right shifts) in the data path:
  // truncate everywhere, round only the final 16-bit output, or round every
  // reduction. Rounding adds half an output LSB before the shift.
  localparam int RND_TRUNC = 0;
  localparam int RND_LAST  = 1;
  localparam int RND_ALL   = 2;

  // v >>> s, rounded half up when rnd is set (s > 0).
  function automatic logic signed [63:0] rshift(input logic signed [63:0] v, input int s,
                                                input logic rnd);
    if (rnd && s > 0) return (v + (64'sd1 <<< (s - 1))) >>> s;
    return v >>> s;
  endfunction

  // Clamp a value to the range of a w-bit two's complement number.
  function automatic logic signed [63:0] sat(input logic signed [63:0] v, input int w);
    logic signed [63:0] hi, lo;
    hi = (64'sd1 <<< (w-1)) - 64'sd1;
    lo = -(64'sd1 <<< (w-1));
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

endpackage
