// tb_farrow_top -- random branch words with random gaps in acc_valid; the
// words flagged by farrow_valid must equal the serial transposed Farrow
// output y(l) = sum_n p(l-7+n, n) from the second input word on, and the
// first flagged word must come after the 6th valid input.
module tb_farrow_top;
  timeunit 1ns; timeprecision 100ps;
  import decim_pkg::*;
  import decim_ref_pkg::*;
  localparam int LANES = 8;
  logic clk = 0, rst = 1, acc_valid = 0;
  v_t v [NBR][LANES];
  f_t out_farrow [LANES];
  logic farrow_valid;
  int checks = 0, failures = 0, nin = 0, first_at = -1;
  longint got[$];
  q_t vin[NBR];

  farrow_top #(.LANES(LANES)) dut (.*);
  always #1 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge clk) if (!rst && farrow_valid) begin
    if (first_at < 0) first_at = nin;
    for (int i = 0; i < LANES; i++) got.push_back(longint'(out_farrow[i]));
  end

  initial begin
    q_t y;
    repeat (2) @(posedge clk);
    #0.1 rst = 0;
    for (int t = 0; t < 2000; t++) begin
      acc_valid = ($urandom_range(0, 2) == 0);
      for (int m = 0; m < int'(NBR); m++)
        for (int i = 0; i < LANES; i++) begin
          // branch values of realistic size: |v| < 1 (Q2.25)
          v[m][i] = v_t'($signed(26'($urandom)));
          if (acc_valid) vin[m].push_back(longint'(v[m][i]));
        end
      if (acc_valid) nin++;
      @(posedge clk); #0.1;
    end
    y = ref_farrow(vin);
    checks++;
    if (first_at != 6) begin failures++; $display("FAIL first valid output after %0d inputs", first_at); end
    checks++;
    if (got.size() != (nin - 5) * LANES) begin failures++; $display("FAIL %0d outputs for %0d inputs", got.size(), nin); end
    for (int k = 0; k < got.size(); k++) begin
      checks++;
      if (got[k] != y[k + LANES]) begin
        failures++;
        if (failures < 10) $display("FAIL y(%0d)=%0d expected %0d", k + LANES, got[k], y[k + LANES]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
