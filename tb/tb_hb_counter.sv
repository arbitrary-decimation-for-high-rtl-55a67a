// tb_hb_counter -- 'active' must stay low until 3 data_valids have been
// counted and then stay high until reset; repeated with random gaps.
module tb_hb_counter;
  timeunit 1ns; timeprecision 100ps;
  logic clk = 0, rst = 1, data_valid = 0, active;
  int checks = 0, failures = 0;

  hb_counter #(.N(3)) dut (.*);
  always #1 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    int nv;
    for (int run = 0; run < 4; run++) begin
      rst = 1; data_valid = 0;
      repeat (2) @(posedge clk);
      #0.1 rst = 0;
      nv = 0;
      for (int t = 0; t < 100; t++) begin
        checks++;
        if (active != (nv >= 3)) begin failures++; $display("FAIL run %0d t %0d count %0d", run, t, nv); end
        data_valid = ($urandom_range(0, 3) == 0);
        @(posedge clk); #0.1;
        if (data_valid) nv++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
