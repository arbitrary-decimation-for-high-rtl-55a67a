// delay_line -- fixed delay of DEPTH clock cycles for a WIDTH-bit word.
//
// A plain shift register, cleared by the synchronous reset so that delayed
// valid and flag bits start inactive. Used for the "nD" delay boxes of the
// decimator (aligning the overflow flags with the u samples, and delaying the
// halfband FIFO read enable by the FIR latency). DEPTH = 0 is a wire.
module delay_line #(
  parameter int unsigned WIDTH = 1,
  parameter int unsigned DEPTH = 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_sr
    logic [WIDTH-1:0] sr [DEPTH];
    always_ff @(posedge clk) begin
      if (rst) begin
        for (int i = 0; i < int'(DEPTH); i++) sr[i] <= '0;
      end else begin
        sr[0] <= d;
        for (int i = 1; i < int'(DEPTH); i++) sr[i] <= sr[i-1];
      end
    end
    assign q = sr[DEPTH-1];
  end
endmodule
