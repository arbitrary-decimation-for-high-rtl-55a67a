// tb_integrate_dump -- random u words and dump flags (sparse and dense) with
// enable gaps; a serial accumulator model gives the expected dumped sum at
// every flagged position, one clock after the word is presented. A second
// instance with ROUNDING = RND_ALL checks the rounded variant.
module tb_integrate_dump;
  timeunit 1ns; timeprecision 100ps;
  import decim_pkg::*;
  import decim_ref_pkg::*;
  localparam int LANES = 8;
  logic clk = 0, rst = 1, en = 0;
  shift_t shift;
  u_t u [LANES];
  logic [LANES-1:0] ov;
  v_t v_u [LANES];
  v_t v_a [LANES];
  int checks = 0, failures = 0, dumps = 0;

  integrate_dump #(.LANES(LANES)) dut (.*);
  integrate_dump #(.LANES(LANES), .ROUNDING(RND_ALL)) dut_a (.clk, .rst, .en, .shift, .u, .ov,
                                                             .v_u(v_a));
  always #1 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    longint acc, acc_a, exp_v[LANES], exp_a[LANES];
    logic [LANES-1:0] ovq;
    for (int sh = 0; sh < 17; sh += 4) begin
      shift = shift_t'(sh);
      rst = 1; en = 0; ov = '0;
      repeat (2) @(posedge clk);
      #0.1 rst = 0;
      acc = 0; acc_a = 0;
      for (int t = 0; t < 300; t++) begin
        en = ($urandom_range(0, 4) != 0);
        for (int i = 0; i < LANES; i++) begin
          u[i] = u_t'($urandom);
          ov[i] = (sh == 0) ? ($urandom_range(0, 1) == 1) : ($urandom_range(0, 15) == 0);
        end
        if (en) begin
          for (int i = 0; i < LANES; i++) begin
            longint tt, ta;
            tt = (longint'(u[i]) <<< V_G) >>> (sh + 1);
            ta = ((longint'(u[i]) <<< V_G) + (64'sd1 <<< sh)) >>> (sh + 1);
            exp_v[i] = wrap(acc >>> V_G, V_W);
            exp_a[i] = wrap((acc_a + (64'sd1 <<< (V_G - 1))) >>> V_G, V_W);
            acc   = ov[i] ? tt : wrap(acc + tt, VA_W);
            acc_a = ov[i] ? ta : wrap(acc_a + ta, VA_W);
          end
        end
        ovq = en ? ov : '0;
        @(posedge clk); #0.1;
        for (int i = 0; i < LANES; i++)
          if (ovq[i]) begin
            checks++; dumps++;
            if (longint'(v_u[i]) != exp_v[i]) begin
              failures++;
              if (failures < 10) $display("FAIL shift %0d t %0d lane %0d: %0d expected %0d", sh, t, i, v_u[i], exp_v[i]);
            end
            checks++;
            if (longint'(v_a[i]) != exp_a[i]) begin
              failures++;
              if (failures < 10) $display("FAIL rounded shift %0d t %0d lane %0d: %0d expected %0d", sh, t, i, v_a[i], exp_a[i]);
            end
          end
      end
    end
    if (dumps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
