// tb_delay_line -- random words through delay lines of depth 1, 6 and 19
// (the depths the decimator uses). Every cycle the output must equal the
// input DEPTH cycles earlier, and zero while fewer than DEPTH words have
// entered since reset. Reset is applied twice to check that it clears the
// line.
module tb_delay_line;
  timeunit 1ns; timeprecision 100ps;
  localparam int W = 12;
  logic clk = 0, rst = 1;
  logic [W-1:0] d;
  logic [W-1:0] q1, q6, q19;
  int checks = 0, failures = 0;

  delay_line #(.WIDTH(W), .DEPTH(1))  u1  (.clk, .rst, .d, .q(q1));
  delay_line #(.WIDTH(W), .DEPTH(6))  u6  (.clk, .rst, .d, .q(q6));
  delay_line #(.WIDTH(W), .DEPTH(19)) u19 (.clk, .rst, .d, .q(q19));
  always #1 clk = ~clk;
  initial begin #20000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic void chk(input logic [W-1:0] got, input logic [W-1:0] exp, input int n, input int t);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL depth %0d cycle %0d: %h expected %h", n, t, got, exp);
    end
  endfunction

  initial begin
    logic [W-1:0] hist[$];
    for (int pass = 0; pass < 2; pass++) begin
      rst = 1; d = '1;
      repeat (3) @(posedge clk);
      #0.1 rst = 0;
      hist = {};
      for (int t = 0; t < 200; t++) begin
        d = W'($urandom);
        @(posedge clk); #0.1;
        hist.push_front(d);                 // hist[k]: the word entered k+1 clocks ago
        chk(q1,  hist.size() >= 1  ? hist[0]  : '0, 1, t);
        chk(q6,  hist.size() >= 6  ? hist[5]  : '0, 6, t);
        chk(q19, hist.size() >= 19 ? hist[18] : '0, 19, t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
