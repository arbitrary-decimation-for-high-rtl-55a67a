// tb_decimation -- end-to-end test of the decimator at its default size.
//
// For each Farrow decimation factor R (total decimation 2R) the design is
// reset with the settings for R, fed random samples (with occasional
// full-scale values) and then a constant, and every output sample is
// compared bit for bit with the serial reference model in decim_ref_pkg.
// The constant part also checks the overall gain independently of the
// model: the settled output must equal the input to within 0.1 %.
// The output rate is checked: one word of 4 outputs per R input words of 8,
// within the pipeline fill. Mechanisms counted (each must occur): dumps of the
// integrate-and-dump stage, packing words that wrap into the next word,
// non-integer R (interval length varies), Farrow pipeline fill,
// halfband delay-branch reads, and a change of R.
module tb_decimation;
  timeunit 1ns;
  timeprecision 100ps;
  import decim_pkg::*;
  import decim_ref_pkg::*;

  localparam int LANES = 8;

  logic    clk = 0;
  logic    rst = 1;
  sample_t signal [LANES];
  rinv_t   r_inverse;
  shift_t  shift;
  scale_t  scale_factor;
  sample_t data_out [LANES/2];
  logic    out_valid;

  int checks = 0, failures = 0;
  int n_dump = 0, n_wrap = 0, n_fill = 0, n_delay = 0, n_frac = 0, n_rchange = 0;
  longint outq[$];

  decimation dut (.*);

  always #1 clk = ~clk;

  initial begin
    #4000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (out_valid && !rst) for (int j = 0; j < LANES/2; j++) outq.push_back(longint'(data_out[j]));
    if (!rst) begin
      n_dump  += $countones(dut.u_acc.ov_d & {LANES{dut.u_acc.live_d}});
      if (dut.u_acc.select_valid && dut.u_acc.g_branch[0].u_sel.wr_nxt != 0) n_wrap++;
      if (dut.u_hb.rd_en) n_delay++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic run_r(input real R, input int nwords_rand, input int nwords_dc);
    longint r, sf;
    int d, n_out_words;
    q_t xs, v[NBR], y, z, ref_out;
    int fv;
    settings(R, r, d, sf);
    r_inverse = rinv_t'(r); shift = shift_t'(d); scale_factor = scale_t'(sf);
    if (r % 65536 != 0 && 65536 % r != 0) n_frac++;
    rst = 1;
    for (int i = 0; i < LANES; i++) signal[i] = '0;
    repeat (4) @(posedge clk);
    outq = {};
    #0.1 rst = 0;
    fv = 0;
    for (int w = 0; w < nwords_rand + nwords_dc; w++) begin
      for (int i = 0; i < LANES; i++) begin
        longint s;
        if (w >= nwords_rand) s = 16384;
        else if ($urandom_range(0, 63) == 0) s = ($urandom_range(0, 1) != 0) ? 32767 : -32768;
        else s = longint'($signed(16'($urandom))) * 7 / 8;
        signal[i] = sample_t'(s);
        xs.push_back(s);
      end
      @(posedge clk);
      if (dut.farrow_valid) fv++;
      #0.1;
    end
    for (int i = 0; i < 40 * LANES; i++) xs.push_back(16384);
    // let the last words drain through the pipelines (input stays constant)
    repeat (40) @(posedge clk);
    if (fv > 0) n_fill++;
    // reference
    ref_accumulate(xs, r, d, v);
    y = ref_farrow(v);
    z = {};
    for (int l = LANES; l < y.size(); l++) z.push_back(ref_scale(y[l], sf));
    ref_out = ref_halfband(z);
    n_out_words = outq.size() / 4;
    $display("R=%f r_inverse=%0d D=%0d S=%0d: %0d outputs, reference %0d", R, r, d, sf,
             outq.size(), ref_out.size());
    check(outq.size() > 0 && outq.size() <= ref_out.size(), $sformatf("R=%f output count", R));
    // rate: (input words) / (2R) output words, less the pipeline fill
    // one output word (4 samples) per R input words, less the pipeline fill
    check(real'(n_out_words) <= real'(nwords_rand + nwords_dc + 40) * real'(r) / 65536.0 + 1.0 &&
          real'(n_out_words) >= real'(nwords_rand + nwords_dc) * real'(r) / 65536.0 - 12.0,
          $sformatf("R=%f output rate: %0d words", R, n_out_words));
    for (int i = 0; i < outq.size() && i < ref_out.size(); i++)
      check(outq[i] == ref_out[i], $sformatf("R=%f out[%0d]=%0d expected %0d", R, i, outq[i], ref_out[i]));
    // settled DC gain: last outputs of the constant part
    if (outq.size() >= 8) begin
      for (int i = outq.size() - 4; i < outq.size(); i++)
        check(outq[i] > 16384 - 17 && outq[i] < 16384 + 17,
              $sformatf("R=%f DC output %0d, expected 16384", R, outq[i]));
    end else check(0, $sformatf("R=%f too few outputs for the DC check", R));
    n_rchange++;
  endtask

  initial begin
    // Farrow factors: the minimum (1), a fraction, and the test factors
    // 2, 3.45, 4, 50, 107.89, 1035.02 (quantised to 2^16/round(2^16/R)).
    run_r(1.0,     24, 40);
    run_r(1.37,    24, 40);
    run_r(2.0,     30, 60);
    run_r(3.45,    40, 80);
    run_r(4.0,     40, 80);
    run_r(50.0,    300, 1000);
    run_r(107.89,  600, 2000);
    run_r(1035.02, 5000, 20000);
    $display("mechanisms: dumps=%0d wrapped_words=%0d fractional_R=%0d farrow_fill=%0d delay_branch=%0d r_changes=%0d",
             n_dump, n_wrap, n_frac, n_fill, n_delay, n_rchange);
    check(n_dump > 0, "no dump happened");
    check(n_wrap > 0, "no packing wrap happened");
    check(n_frac > 0, "no fractional R run");
    check(n_fill > 0, "farrow pipeline never filled");
    check(n_delay > 0, "halfband delay branch never read");
    check(n_rchange > 1, "R never changed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
