// select_samples -- packs the dumped values of one Farrow branch into words.
//
// Controlled by sort_samples: position p of the word under construction
// takes v_u[select[p]] wherever overflow_sorted[p] is set. A 'filled' mask
// records the positions already written. A position that is flagged but
// already filled belongs to the next word: it is parked in the buffer for the
// next word ('filled_next'). When select_valid is high the completed word
// (old contents plus this clock's first-word writes) is presented on v_sorted
// with valid_out for one clock, and the parked values start the next word.
// Registered outputs, latency 1. v_sorted[0] is the oldest value of the word.
// Behaviour as in the source design (filled / filled_next); the
// implementation is this design's own.
module select_samples
  import decim_pkg::*;
#(
  parameter int unsigned LANES = 8
) (
  input  logic                     clk,
  input  logic                     rst,
  input  v_t                       v_u [LANES],
  input  logic [LANES-1:0]         overflow_sorted,
  input  logic [$clog2(LANES)-1:0] select [LANES],
  input  logic                     select_valid,
  output v_t                       v_sorted [LANES],
  output logic                     valid_out
);
  v_t               buf_q  [LANES];
  logic [LANES-1:0] filled;
  v_t               cur    [LANES];
  v_t               nxt    [LANES];
  logic [LANES-1:0] wr_cur, wr_nxt;

  always_comb begin
    wr_cur = overflow_sorted & ~filled;
    wr_nxt = overflow_sorted & filled;
    for (int p = 0; p < int'(LANES); p++) begin
      cur[p] = wr_cur[p] ? v_u[select[p]] : buf_q[p];
      nxt[p] = wr_nxt[p] ? v_u[select[p]] : cur[p];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      filled    <= '0;
      valid_out <= 1'b0;
      for (int p = 0; p < int'(LANES); p++) begin
        buf_q[p]    <= '0;
        v_sorted[p] <= '0;
      end
    end else begin
      valid_out <= select_valid;
      buf_q     <= nxt;
      if (select_valid) begin
        v_sorted <= cur;
        filled   <= wr_nxt;
      end else begin
        filled   <= filled | wr_cur;
      end
    end
  end
endmodule
