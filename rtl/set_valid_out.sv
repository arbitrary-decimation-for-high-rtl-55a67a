// set_valid_out -- output valid of the data-driven Farrow pipeline.
//
// The Farrow pipeline advances only on acc_valid. Its output is meaningful
// once FILL valid input words have entered it; from then on the output is
// valid in the clock after every acc_valid. A saturating counter of valid
// inputs does this. FILL = 6 is the source design's figure; it matches the
// depth of farrow_top (five enabled stages plus the one-word history).
module set_valid_out #(
  parameter int unsigned FILL = 6
) (
  input  logic clk,
  input  logic rst,
  input  logic acc_valid,
  output logic farrow_valid
);
  localparam int unsigned CW = $clog2(FILL + 1);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt          <= '0;
      farrow_valid <= 1'b0;
    end else begin
      farrow_valid <= acc_valid && (cnt >= CW'(FILL - 1));
      if (acc_valid && cnt != CW'(FILL)) cnt <= cnt + 1'b1;
    end
  end
endmodule
