// halfband_top -- fixed decimation by 2 after the Farrow filter.
//
// Input: 8 scaled samples s(8c+0..7) per scaled_valid (Q2.22). Output: 4
// samples per word, Q1.15, rounded:
//   y(4c+j) = sum_{i=0}^{23} h[2i+1] s(8c+2j-2i) + 0.5 s(8(c-3)+2j+1)
// Polyphase form: the even lanes 0,2,4,6 feed fir_halfband (the non-zero
// odd-index taps); the odd lanes 1,3,5,7 form the delay branch, which is the
// centre tap 0.5 applied to samples 3 words older. The odd lanes are written
// to a FIFO on every scaled_valid; the read request is scaled_valid gated by
// hb_counter (open after the first 3 words) and delayed by the FIR latency
// (19 clocks), so it arrives together with the matching FIR output. The sum
// is rounded (round half up; truncated with ROUNDING = RND_TRUNC) and
// saturated to 16 bits; out_valid marks
// data_out, 19 + 1 clocks after the word's scaled_valid.
// Structure as in the source design. In it the text gates the FIFO write
// enable while its block diagram gates the delayed read enable; the read
// side is gated here, which gives the 3-word offset. The choice of which
// phase is even, and out_valid itself, are this design's own.
module halfband_top
  import decim_pkg::*;
#(
  parameter int unsigned FIR_LAT  = 19,
  parameter int          ROUNDING = RND_LAST
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    scaled_valid,
  input  hb_t     scaled_data [8],
  output sample_t data_out    [4],
  output logic    out_valid
);
  typedef logic signed [HB_ACC_W-1:0] acc_t;

  hb_t              even [4];
  logic [4*HB_W-1:0] odd_w, fifo_q;
  acc_t             fir  [4];
  logic             fir_valid, active, rd_en, rd_req;
  logic             fifo_empty, fifo_full;
  acc_t             dly  [4];
  acc_t             tot  [4];

  always_comb begin
    for (int j = 0; j < 4; j++) begin
      even[j] = scaled_data[2*j];
      odd_w[j*HB_W +: HB_W] = scaled_data[2*j+1];
    end
  end

  fir_halfband #(.LAT(FIR_LAT)) u_fir (
    .clk, .rst, .in_valid(scaled_valid), .e(even), .y(fir), .out_valid(fir_valid)
  );

  hb_counter #(.N(3)) u_cnt (.clk, .rst, .data_valid(scaled_valid), .active);

  assign rd_req = active ? scaled_valid : 1'b0;

  delay_line #(.WIDTH(1), .DEPTH(FIR_LAT)) u_rd_dly (
    .clk, .rst, .d(rd_req), .q(rd_en)
  );

  hb_fifo #(.WIDTH(4*HB_W), .DEPTH(32)) u_fifo (
    .clk, .rst, .wr_en(scaled_valid), .wr_data(odd_w), .rd_en,
    .rd_data(fifo_q), .empty(fifo_empty), .full(fifo_full)
  );

  always_comb begin
    for (int j = 0; j < 4; j++) begin
      // 0.5 * s in the Q.37 format of the FIR sum: s (Q2.22) << 15, halved.
      dly[j] = rd_en ? (acc_t'(hb_t'(fifo_q[j*HB_W +: HB_W])) <<< 14) : '0;
      tot[j] = fir[j] + dly[j] + ((ROUNDING == RND_TRUNC) ? '0 : (acc_t'(1) <<< 21));
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      for (int j = 0; j < 4; j++) data_out[j] <= '0;
    end else begin
      out_valid <= fir_valid;
      if (fir_valid)
        for (int j = 0; j < 4; j++)
          data_out[j] <= sample_t'(sat(64'(tot[j] >>> 22), DATA_W));
    end
  end

  a_fifo_matches_fir: assert property (@(posedge clk) disable iff (rst) rd_en |-> fir_valid);
  a_fifo_not_empty:   assert property (@(posedge clk) disable iff (rst) rd_en |-> !fifo_empty);
  a_fifo_not_full:    assert property (@(posedge clk) disable iff (rst) scaled_valid |-> !fifo_full);
endmodule
