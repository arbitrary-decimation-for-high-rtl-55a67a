// hb_counter -- enables the delay branch of the halfband decimator.
//
// The delay branch (centre tap) must lag the FIR branch by 3 input words (12
// zero taps before the centre tap, 4 outputs per word), so the first 3 FIR
// outputs have no delay-branch partner. This counter counts data_valid up to
// N and then raises 'active', which selects data_valid (instead of 0) as the
// FIFO read request. Behaviour as in the source design.
module hb_counter #(
  parameter int unsigned N = 3
) (
  input  logic clk,
  input  logic rst,
  input  logic data_valid,
  output logic active
);
  localparam int unsigned CW = $clog2(N + 1);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst)                                  cnt <= '0;
    else if (data_valid && cnt != CW'(N))     cnt <= cnt + 1'b1;
  end

  assign active = (cnt == CW'(N));
endmodule
