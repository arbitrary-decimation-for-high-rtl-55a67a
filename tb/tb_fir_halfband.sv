// tb_fir_halfband -- random even-phase words with random gaps; each output
// must equal sum_i h[2i+1] E(q-i) over the input history (zero before the
// start) and appear exactly LAT = 19 clocks after its input word.
module tb_fir_halfband;
  timeunit 1ns; timeprecision 100ps;
  import decim_pkg::*;
  localparam int LAT = 19;
  logic clk = 0, rst = 1, in_valid = 0;
  hb_t e [4];
  logic signed [HB_ACC_W-1:0] y [4];
  logic out_valid;
  int checks = 0, failures = 0, nout = 0, cyc = 0;
  longint es[$];
  int in_cyc[$];

  fir_halfband #(.LAT(LAT)) dut (.*);
  always #1 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge clk) begin
    cyc++;
    if (!rst && out_valid) begin
      checks++;
      if (cyc - in_cyc[nout] != LAT) begin
        failures++; $display("FAIL latency %0d", cyc - in_cyc[nout]);
      end
      for (int j = 0; j < 4; j++) begin
        longint acc;
        int q;
        q = 4 * nout + j;
        acc = 0;
        for (int i = 0; i < int'(HB_NODD); i++)
          if (q - i >= 0) acc += longint'(hb_coef(i)) * es[q - i];
        checks++;
        if (longint'(y[j]) != acc) begin
          failures++;
          if (failures < 10) $display("FAIL out %0d: %0d expected %0d", q, y[j], acc);
        end
      end
      nout++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    #0.1 rst = 0;
    for (int t = 0; t < 1500; t++) begin
      in_valid = ($urandom_range(0, 2) == 0);
      for (int j = 0; j < 4; j++) begin
        e[j] = hb_t'($urandom);
        if (in_valid) es.push_back(longint'(e[j]));
      end
      if (in_valid) in_cyc.push_back(cyc + 1);
      @(posedge clk); #0.1;
    end
    in_valid = 0;
    repeat (LAT + 2) @(posedge clk);
    checks++;
    if (nout != in_cyc.size()) begin failures++; $display("FAIL %0d outputs for %0d inputs", nout, in_cyc.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
