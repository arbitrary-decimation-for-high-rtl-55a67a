// fir_halfband -- FIR branch of the polyphase halfband decimator.
//
// Polyphase decomposition of the 49-tap halfband filter: the non-zero
// odd-index taps h[1], h[3], ..., h[47] act on one phase of the input only
// (the "even" samples E), so this branch is a 24-tap FIR at half the input
// rate, computing 4 outputs per input word:
//   y_fir(4c+j) = sum_{i=0}^{23} h[2i+1] * E(4c+j-i),  j = 0..3
// where E(4c+j) = e[j] of word c. The symmetry h[2i+1] = h[47-2i] is used
// with a pre-adder, so each output takes 12 multiplications (48 in all).
// A history of the last 6 words is shifted on in_valid (zero after reset).
// Pipeline: pre-add, multiply (25 x 16 bit), 4-level adder tree, then plain
// delay registers up to LAT clock cycles in total; the pipeline runs every
// clock and out_valid is in_valid delayed by LAT. Output format Q9.37
// (HB_ACC_W bits, no rounding). LAT = 19 is the latency of the source
// design's FIR; its generated FIR core is replaced by this module.
module fir_halfband
  import decim_pkg::*;
#(
  parameter int unsigned LAT = 19
) (
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  input  hb_t  e [4],
  output logic signed [HB_ACC_W-1:0] y [4],
  output logic out_valid
);
  localparam int unsigned NW   = HB_NODD / 4;        // words of history (6)
  localparam int unsigned NU   = HB_NODD / 2;        // unique taps (12)
  localparam int unsigned PA_W = HB_W + 1;
  typedef logic signed [HB_ACC_W-1:0] acc_t;
  typedef logic signed [PA_W-1:0]     pa_t;

  hb_t  hist [NW][4];
  hb_t  x    [4*(NW+1)];         // x[k] = E(4c+3-k), k = 0 newest
  pa_t  pre  [4][NU];
  logic v_pre, v_mul, v_l1, v_l2, v_l3, v_l4;
  acc_t mul  [4][NU];
  acc_t l1   [4][6];
  acc_t l2   [4][3];
  acc_t l3   [4][2];
  acc_t l4   [4];

  always_comb begin
    for (int j = 0; j < 4; j++) x[3-j] = e[j];
    for (int w = 0; w < int'(NW); w++)
      for (int j = 0; j < 4; j++) x[4*(w+1) + 3 - j] = hist[w][j];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int w = 0; w < int'(NW); w++)
        for (int j = 0; j < 4; j++) hist[w][j] <= '0;
    end else if (in_valid) begin
      hist[0] <= e;
      for (int w = 1; w < int'(NW); w++) hist[w] <= hist[w-1];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      {v_pre, v_mul, v_l1, v_l2, v_l3, v_l4} <= '0;
    end else begin
      {v_pre, v_mul, v_l1, v_l2, v_l3, v_l4} <= {in_valid, v_pre, v_mul, v_l1, v_l2, v_l3};
    end
  end

  always_ff @(posedge clk) begin
    for (int j = 0; j < 4; j++) begin
      for (int i = 0; i < int'(NU); i++) begin
        pre[j][i] <= pa_t'(x[3-j+i]) + pa_t'(x[3-j+int'(HB_NODD)-1-i]);
        mul[j][i] <= acc_t'(pre[j][i]) * acc_t'(hb_coef(i));
      end
      for (int k = 0; k < 6; k++) l1[j][k] <= mul[j][2*k] + mul[j][2*k+1];
      for (int k = 0; k < 3; k++) l2[j][k] <= l1[j][2*k] + l1[j][2*k+1];
      l3[j][0] <= l2[j][0] + l2[j][1];
      l3[j][1] <= l2[j][2];
      l4[j]    <= l3[j][0] + l3[j][1];
    end
  end

  delay_line #(.WIDTH(4*HB_ACC_W + 1), .DEPTH(LAT - 6)) u_pad (
    .clk, .rst,
    .d({v_l4, l4[3], l4[2], l4[1], l4[0]}),
    .q({out_valid, y[3], y[2], y[1], y[0]})
  );
endmodule
