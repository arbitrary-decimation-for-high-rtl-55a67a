// tb_accumulate_top -- random input stream for several R; every packed
// branch word (acc_valid) must equal the next 8 interval sums of the serial
// reference model, for all 6 branches. Also checks that words arrive at the
// rate 1/R of the input words (within the pipeline delay).
module tb_accumulate_top;
  timeunit 1ns; timeprecision 100ps;
  import decim_pkg::*;
  import decim_ref_pkg::*;
  localparam int LANES = 8;
  logic clk = 0, rst = 1;
  sample_t signal [LANES];
  rinv_t r_inverse;
  shift_t shift;
  v_t v [NBR][LANES];
  logic acc_valid;
  int checks = 0, failures = 0;
  longint got[NBR][$];

  accumulate_top #(.LANES(LANES)) dut (.*);
  always #1 clk = ~clk;
  initial begin #400000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge clk) if (!rst && acc_valid)
    for (int m = 0; m < int'(NBR); m++)
      for (int i = 0; i < LANES; i++) got[m].push_back(longint'(v[m][i]));

  initial begin
    real Rs[5] = '{1.0, 1.37, 3.45, 8.0, 50.0};
    foreach (Rs[t]) begin
      longint r, sf;
      int d, nw;
      q_t xs, vr[NBR];
      xs = {};
      settings(Rs[t], r, d, sf);
      r_inverse = rinv_t'(r); shift = shift_t'(d);
      rst = 1;
      repeat (3) @(posedge clk);
      for (int m = 0; m < int'(NBR); m++) got[m] = {};
      #0.1 rst = 0;
      nw = 400;
      for (int w = 0; w < nw; w++) begin
        for (int i = 0; i < LANES; i++) begin
          signal[i] = sample_t'($urandom);
          xs.push_back(longint'(signal[i]));
        end
        @(posedge clk); #0.1;
      end
      ref_accumulate(xs, r, d, vr);
      checks++;
      if (real'(got[0].size() / LANES) < real'(nw) * real'(r) / 65536.0 - 12.0 ||
          got[0].size() > vr[0].size()) begin
        failures++; $display("FAIL R=%f: %0d values, reference %0d", Rs[t], got[0].size(), vr[0].size());
      end
      for (int m = 0; m < int'(NBR); m++)
        for (int k = 0; k < got[m].size() && k < vr[m].size(); k++) begin
          checks++;
          if (got[m][k] != vr[m][k]) begin
            failures++;
            if (failures < 10) $display("FAIL R=%f m=%0d v(%0d)=%0d expected %0d", Rs[t], m, k, got[m][k], vr[m][k]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
