// hb_fifo -- common-clock FIFO for the halfband delay branch.
//
// DEPTH words of WIDTH bits in a register array with write and read
// pointers. rd_data always shows the oldest word (first-word fall-through);
// rd_en removes it. Writing when full or reading when empty is a usage
// error, checked by assertions. The source design used a generated FIFO of
// width 96 (4 samples of 24 bits) and depth 32 (at most 23 words are held);
// this is a plain behavioural replacement with the same size.
module hb_fifo #(
  parameter int unsigned WIDTH = 96,
  parameter int unsigned DEPTH = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wp, rp;

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (wr_en) begin
        mem[wp[AW-1:0]] <= wr_data;
        wp <= wp + 1'b1;
      end
      if (rd_en) rp <= rp + 1'b1;
    end
  end

  assign rd_data = mem[rp[AW-1:0]];
  assign empty   = (wp == rp);
  assign full    = (wp[AW-1:0] == rp[AW-1:0]) && (wp[AW] != rp[AW]);

  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) !(wr_en && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) !(rd_en && empty));
endmodule
