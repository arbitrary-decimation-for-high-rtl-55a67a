// sort_samples -- control for packing dumped values into full words.
//
// The overflow vector marks which of the LANES positions of a word carry a
// dumped (valid) value. A counter remembers how many positions of the
// current output word are already filled. The j-th flagged position of the
// input (counting from lane 0) is assigned output position
// (counter + j) mod LANES: overflow_sorted gets a one there and select the
// lane number it comes from. select_valid is raised when the counter plus the
// number of flags reaches LANES, i.e. an output word is complete; flags that
// wrap past the last position already belong to the next word.
// Example (LANES = 8, vectors written MSB first): counter 0, overflow
// 10101011 gives overflow_sorted 00011111, select xxx75310, select_valid 0.
// Registered outputs, latency 1; en = 0 holds the counter and clears the
// outputs. Behaviour as in the source design; the implementation is this
// design's own.
module sort_samples #(
  parameter int unsigned LANES = 8
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     en,
  input  logic [LANES-1:0]         overflow,
  output logic [LANES-1:0]         overflow_sorted,
  output logic [$clog2(LANES)-1:0] select [LANES],
  output logic                     select_valid
);
  localparam int unsigned LW = $clog2(LANES);
  logic [LW-1:0]    counter;
  logic [LW:0]      total;
  logic [LANES-1:0] ovs;
  logic [LW-1:0]    sel [LANES];
  logic [LW-1:0]    pos;

  always_comb begin
    ovs   = '0;
    pos   = counter;
    total = {1'b0, counter};
    for (int p = 0; p < int'(LANES); p++) sel[p] = '0;
    for (int i = 0; i < int'(LANES); i++) begin
      if (overflow[i]) begin
        ovs[pos] = 1'b1;
        sel[pos] = LW'(i);
        pos      = LW'((int'(pos) + 1) % int'(LANES));
        total    = total + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      counter         <= '0;
      overflow_sorted <= '0;
      select_valid    <= 1'b0;
      for (int p = 0; p < int'(LANES); p++) select[p] <= '0;
    end else begin
      overflow_sorted <= en ? ovs : '0;
      select_valid    <= en && (total >= (LW+1)'(LANES));
      select          <= sel;
      if (en) counter <= pos;
    end
  end
endmodule
