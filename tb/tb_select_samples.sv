// tb_select_samples -- random dumped values with random flags; the control
// inputs are formed by the testbench (same rule as sort_samples). Every
// flagged value must come out exactly once, in sample order, in 8-wide
// words flagged by valid_out one clock after select_valid.
module tb_select_samples;
  timeunit 1ns; timeprecision 100ps;
  import decim_pkg::*;
  localparam int LANES = 8;
  logic clk = 0, rst = 1;
  v_t v_u [LANES];
  logic [LANES-1:0] overflow_sorted;
  logic [2:0] select [LANES];
  logic select_valid;
  v_t v_sorted [LANES];
  logic valid_out;
  int checks = 0, failures = 0, words = 0;
  longint expq[$];

  select_samples #(.LANES(LANES)) dut (.*);
  always #1 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge clk) if (!rst && valid_out) begin
    words++;
    for (int p = 0; p < LANES; p++) begin
      checks++;
      if (expq.size() == 0 || longint'(v_sorted[p]) != expq[0]) begin
        failures++;
        if (failures < 10) $display("FAIL word %0d pos %0d", words, p);
      end
      if (expq.size() > 0) void'(expq.pop_front());
    end
  end

  initial begin
    int cnt;
    logic [7:0] ov;
    select_valid = 0; overflow_sorted = '0;
    for (int p = 0; p < LANES; p++) select[p] = '0;
    repeat (2) @(posedge clk);
    #0.1 rst = 0;
    cnt = 0;
    for (int t = 0; t < 3000; t++) begin
      ov = (t % 500 < 250) ? 8'($urandom) & 8'($urandom) : 8'($urandom) | 8'($urandom);
      for (int i = 0; i < LANES; i++) v_u[i] = v_t'($urandom);
      overflow_sorted = '0;
      select_valid = (cnt + $countones(ov)) >= 8;
      for (int i = 0; i < 8; i++)
        if (ov[i]) begin
          overflow_sorted[cnt] = 1; select[cnt] = 3'(i); cnt = (cnt + 1) % 8;
          expq.push_back(longint'(v_u[i]));
        end
      @(posedge clk); #0.1;
    end
    if (words < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
