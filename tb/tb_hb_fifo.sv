// tb_hb_fifo -- random writes and reads (never past full or empty) against a
// queue model: rd_data must always show the oldest word, and empty / full
// must match the model's occupancy; the FIFO is filled to 32 once.
module tb_hb_fifo;
  timeunit 1ns; timeprecision 100ps;
  logic clk = 0, rst = 1, wr_en = 0, rd_en = 0, empty, full;
  logic [95:0] wr_data, rd_data;
  int checks = 0, failures = 0, maxfill = 0;
  logic [95:0] q[$];

  hb_fifo #(.WIDTH(96), .DEPTH(32)) dut (.*);
  always #1 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (2) @(posedge clk);
    #0.1 rst = 0;
    for (int t = 0; t < 4000; t++) begin
      int bias;
      bias = (t % 400 < 200) ? 3 : 1;
      wr_en = (q.size() < 32) && ($urandom_range(0, 3) < bias);
      rd_en = (q.size() > 0) && ($urandom_range(0, 3) < 4 - bias);
      wr_data = {$urandom, $urandom, $urandom};
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == 32) || (q.size() > 0 && rd_data != q[0])) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d fill %0d", t, q.size());
      end
      @(posedge clk); #0.1;
      if (rd_en) void'(q.pop_front());
      if (wr_en) q.push_back(wr_data);
      if (q.size() > maxfill) maxfill = q.size();
    end
    checks++;
    if (maxfill != 32) begin failures++; $display("FAIL never full (max %0d)", maxfill); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
