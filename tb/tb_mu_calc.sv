// tb_mu_calc -- checks mu and the dump flags against the serial recurrence
// mu_k = frac(mu_{k-1} + r), overflow_k = carry, for several r (R = 1,
// integer and fractional R), 8 samples per clock, first word one clock
// after reset.
module tb_mu_calc;
  timeunit 1ns; timeprecision 100ps;
  import decim_pkg::*;
  localparam int LANES = 8;
  logic clk = 0, rst = 1;
  rinv_t r_inverse;
  mu_t mu [LANES];
  logic [LANES-1:0] overflow;
  int checks = 0, failures = 0;

  mu_calc #(.LANES(LANES)) dut (.*);
  always #1 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    int rs[6] = '{65536, 32768, 18996, 47836, 63, 1311};
    foreach (rs[t]) begin
      longint acc, s;
      rst = 1; r_inverse = rinv_t'(rs[t]);
      repeat (3) @(posedge clk);
      #0.1 rst = 0;
      acc = 0;
      for (int w = 0; w < 200; w++) begin
        @(posedge clk); #0.1;
        for (int i = 0; i < LANES; i++) begin
          s = acc + rs[t];
          acc = s % 65536;
          checks++;
          if (mu[i] != mu_t'(acc) || overflow[i] != (s >= 65536)) begin
            failures++;
            if (failures < 10) $display("FAIL r=%0d word %0d lane %0d: mu %0d/%0d ov %0d/%0d",
              rs[t], w, i, mu[i], acc, overflow[i], s >= 65536);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
