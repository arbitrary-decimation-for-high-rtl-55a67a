// tb_halfband_top -- random 8-sample words with random gaps in scaled_valid;
// every output must equal the serial halfband reference (49 taps, centre
// tap 0.5, rounding to Q1.15) and arrive 20 clocks after its input word.
module tb_halfband_top;
  timeunit 1ns; timeprecision 100ps;
  import decim_pkg::*;
  import decim_ref_pkg::*;
  logic clk = 0, rst = 1, scaled_valid = 0;
  hb_t scaled_data [8];
  sample_t data_out [4];
  logic out_valid;
  int checks = 0, failures = 0, cyc = 0, nout = 0;
  q_t s;
  longint got[$];
  int in_cyc[$];

  halfband_top dut (.*);
  always #1 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge clk) begin
    cyc++;
    if (!rst && out_valid) begin
      checks++;
      if (cyc - in_cyc[nout] != 20) begin failures++; $display("FAIL latency %0d", cyc - in_cyc[nout]); end
      nout++;
      for (int j = 0; j < 4; j++) got.push_back(longint'(data_out[j]));
    end
  end

  initial begin
    q_t ref_o;
    repeat (2) @(posedge clk);
    #0.1 rst = 0;
    for (int t = 0; t < 1500; t++) begin
      scaled_valid = ($urandom_range(0, 2) == 0);
      for (int i = 0; i < 8; i++) begin
        scaled_data[i] = hb_t'($signed(23'($urandom)));   // |s| < 1
        if (scaled_valid) s.push_back(longint'(scaled_data[i]));
      end
      if (scaled_valid) in_cyc.push_back(cyc + 1);
      @(posedge clk); #0.1;
    end
    scaled_valid = 0;
    repeat (25) @(posedge clk);
    ref_o = ref_halfband(s);
    checks++;
    if (got.size() != ref_o.size()) begin failures++; $display("FAIL %0d outputs, expected %0d", got.size(), ref_o.size()); end
    for (int k = 0; k < got.size() && k < ref_o.size(); k++) begin
      checks++;
      if (got[k] != ref_o[k]) begin
        failures++;
        if (failures < 10) $display("FAIL out %0d: %0d expected %0d", k, got[k], ref_o[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
