// tb_farrow_filter -- random branch values with random enable gaps; after
// two enabled clocks p[n] must equal sum_m c_m(n) v_m truncated to Q5.25
// (computed with the coefficient table directly, without the symmetry).
module tb_farrow_filter;
  timeunit 1ns; timeprecision 100ps;
  import decim_pkg::*;
  import decim_ref_pkg::*;
  logic clk = 0, rst = 1, en = 0;
  v_t v [NBR];
  p_t p [NTAP];
  int checks = 0, failures = 0;
  longint hist[$][NTAP];

  farrow_filter dut (.*);
  always #1 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    longint e[NTAP];
    int nen;
    repeat (2) @(posedge clk);
    #0.1 rst = 0;
    nen = 0;
    for (int t = 0; t < 3000; t++) begin
      en = ($urandom_range(0, 2) != 0);
      for (int m = 0; m < int'(NBR); m++) v[m] = v_t'($urandom);
      if (en) begin
        for (int n = 0; n < int'(NTAP); n++) begin
          longint s;
          s = 0;
          for (int m = 0; m < int'(NBR); m++) s += longint'(v[m]) * longint'(farrow_coef(m, n));
          e[n] = wrap(s >>> 15, P_W);
        end
        hist.push_back(e);
        nen++;
      end
      @(posedge clk); #0.1;
      if (nen >= 2) begin
        for (int n = 0; n < int'(NTAP); n++) begin
          checks++;
          if (longint'(p[n]) != hist[nen-2][n]) begin
            failures++;
            if (failures < 10) $display("FAIL t=%0d n=%0d: %0d expected %0d", t, n, p[n], hist[nen-2][n]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
