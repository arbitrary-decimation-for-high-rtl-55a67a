// tb_sort_samples -- first the three-clock example (counter 0, 5, 2), then
// random overflow vectors. Expected values come from a counter model:
// the j-th flag goes to position (counter + j) mod 8 with its lane number;
// select_valid when counter + flags >= 8. Outputs appear one clock later.
module tb_sort_samples;
  timeunit 1ns; timeprecision 100ps;
  localparam int LANES = 8;
  logic clk = 0, rst = 1, en = 0;
  logic [LANES-1:0] overflow, overflow_sorted;
  logic [2:0] select [LANES];
  logic select_valid;
  int checks = 0, failures = 0;

  sort_samples #(.LANES(LANES)) dut (.*);
  always #1 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    int cnt;
    logic [7:0] ex_ovs;
    int ex_sel[8];
    bit ex_sv;
    logic [7:0] ex_in [3] = '{8'b10101011, 8'b11010101, 8'b10101010};
    logic [7:0] ex_out[3] = '{8'b00011111, 8'b11100011, 8'b00111100};
    bit ex_val[3] = '{0, 1, 0};
    repeat (2) @(posedge clk);
    #0.1 rst = 0; en = 1;
    cnt = 0;
    for (int t = 0; t < 2003; t++) begin
      overflow = (t < 3) ? ex_in[t] : 8'($urandom) & 8'($urandom);
      ex_ovs = '0;
      ex_sv = (cnt + $countones(overflow)) >= 8;
      for (int i = 0; i < 8; i++)
        if (overflow[i]) begin ex_ovs[cnt] = 1; ex_sel[cnt] = i; cnt = (cnt + 1) % 8; end
      @(posedge clk); #0.1;
      if (t < 3) chk(overflow_sorted == ex_out[t] && select_valid == ex_val[t], $sformatf("example clock %0d", t));
      chk(overflow_sorted == ex_ovs && select_valid == ex_sv, $sformatf("t=%0d ovs %b/%b", t, overflow_sorted, ex_ovs));
      for (int p = 0; p < 8; p++)
        if (ex_ovs[p]) chk(int'(select[p]) == ex_sel[p], $sformatf("t=%0d select[%0d]", t, p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
