// tb_set_valid_out -- random acc_valid pattern; farrow_valid must be low for
// the first 5 valid inputs and then follow acc_valid one clock later.
module tb_set_valid_out;
  timeunit 1ns; timeprecision 100ps;
  logic clk = 0, rst = 1, acc_valid = 0, farrow_valid;
  int checks = 0, failures = 0;

  set_valid_out #(.FILL(6)) dut (.*);
  always #1 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    int nv;
    bit exp_v;
    for (int run = 0; run < 3; run++) begin
      rst = 1; acc_valid = 0;
      repeat (2) @(posedge clk);
      #0.1 rst = 0;
      nv = 0;
      for (int t = 0; t < 300; t++) begin
        acc_valid = ($urandom_range(0, 3) == 0);
        if (acc_valid) nv++;
        exp_v = acc_valid && nv >= 6;
        @(posedge clk); #0.1;
        checks++;
        if (farrow_valid != exp_v) begin
          failures++;
          if (failures < 10) $display("FAIL run %0d t=%0d valid inputs %0d", run, t, nv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
