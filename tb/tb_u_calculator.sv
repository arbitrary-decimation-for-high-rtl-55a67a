// tb_u_calculator -- random x and mu into one lane; each output set must
// equal x(2mu-1)^m from the reference model exactly U_LAT = 6 clocks later.
// Includes x = -1 with mu = 0 (the saturating product).
module tb_u_calculator;
  timeunit 1ns; timeprecision 100ps;
  import decim_pkg::*;
  import decim_ref_pkg::*;
  logic clk = 0;
  sample_t x;
  mu_t mu;
  u_t u [NBR];
  int checks = 0, failures = 0;
  longint xq[$], mq[$];

  u_calculator dut (.*);
  always #1 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    longint ru[NBR];
    for (int t = 0; t < 2000; t++) begin
      if (t % 97 == 0) begin x = sample_t'(-32768); mu = '0; end
      else begin x = sample_t'($urandom); mu = mu_t'($urandom); end
      xq.push_back(longint'(x)); mq.push_back(longint'(mu));
      @(posedge clk); #0.1;
      if (t >= int'(U_LAT) - 1) begin
        int k;
        longint xk, mk;
        k = t - int'(U_LAT) + 1;
        xk = xq[k]; mk = mq[k];
        ref_u(xk, mk, ru);
        for (int m = 0; m < int'(NBR); m++) begin
          checks++;
          if (longint'(u[m]) != ru[m]) begin
            failures++;
            if (failures < 10) $display("FAIL t=%0d m=%0d: %0d expected %0d", t, m, u[m], ru[m]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
