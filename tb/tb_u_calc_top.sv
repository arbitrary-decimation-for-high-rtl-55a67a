// tb_u_calc_top -- 8 lanes of random samples and mu; every lane and branch
// must match the reference u values U_LAT clocks later.
module tb_u_calc_top;
  timeunit 1ns; timeprecision 100ps;
  import decim_pkg::*;
  import decim_ref_pkg::*;
  localparam int LANES = 8;
  logic clk = 0;
  sample_t x [LANES];
  mu_t mu [LANES];
  u_t u [NBR][LANES];
  int checks = 0, failures = 0;
  longint xq[$], mq[$];

  u_calc_top #(.LANES(LANES)) dut (.*);
  always #1 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    longint ru[NBR];
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < LANES; i++) begin
        x[i] = sample_t'($urandom); mu[i] = mu_t'($urandom);
        xq.push_back(longint'(x[i])); mq.push_back(longint'(mu[i]));
      end
      @(posedge clk); #0.1;
      if (t >= int'(U_LAT) - 1)
        for (int i = 0; i < LANES; i++) begin
          int k;
          k = (t - int'(U_LAT) + 1) * LANES + i;
          ref_u(xq[k], mq[k], ru);
          for (int m = 0; m < int'(NBR); m++) begin
            checks++;
            if (longint'(u[m][i]) != ru[m]) begin
              failures++;
              if (failures < 10) $display("FAIL t=%0d lane %0d m=%0d", t, i, m);
            end
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
