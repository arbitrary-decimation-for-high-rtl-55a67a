// tb_scale_data -- random Farrow outputs and scale factors; when
// farrow_valid is set the next clock must show (y * S) >> 20 saturated to
// 24 bits and scaled_valid; otherwise the outputs hold.
module tb_scale_data;
  timeunit 1ns; timeprecision 100ps;
  import decim_pkg::*;
  import decim_ref_pkg::*;
  localparam int LANES = 8;
  logic clk = 0, rst = 1, farrow_valid = 0;
  scale_t scale_factor;
  f_t out_farrow [LANES];
  hb_t scaled_data [LANES];
  logic scaled_valid;
  int checks = 0, failures = 0;

  scale_data #(.LANES(LANES)) dut (.*);
  always #1 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    longint e[LANES];
    for (int i = 0; i < LANES; i++) e[i] = 0;
    repeat (2) @(posedge clk);
    #0.1 rst = 0;
    for (int t = 0; t < 3000; t++) begin
      farrow_valid = ($urandom_range(0, 1) == 1);
      scale_factor = scale_t'($urandom_range(131072, 262143));
      for (int i = 0; i < LANES; i++) begin
        out_farrow[i] = f_t'($urandom);
        if (farrow_valid) e[i] = ref_scale(longint'(out_farrow[i]), longint'(scale_factor));
      end
      @(posedge clk); #0.1;
      checks++;
      if (scaled_valid != farrow_valid) failures++;
      for (int i = 0; i < LANES; i++) begin
        checks++;
        if (longint'(scaled_data[i]) != e[i]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d lane %0d: %0d expected %0d", t, i, scaled_data[i], e[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
