// tb_decimation_accuracy -- the three rounding variants of the decimator
// (ROUNDING = RND_TRUNC, RND_LAST, RND_ALL) side by side, for the decimation
// factors R = 2, 3.45, 4, 50, 107.89 and 1035.02 (total decimation 2R).
//
// Each variant is compared bit for bit with the reference model set to the
// same rounding, and its accuracy is measured against a floating-point model
// of the algorithm.
//
// The floating-point model uses the same quantised input, decimation factor
// and 16-bit coefficients as the hardware, so the difference is only the
// rounding and truncation inside the design. Input: a sine of amplitude 0.9
// at 0.13 of the output rate (inside the 80 % passband). For each R the
// testbench reports mean error, maximum error (in units of 2^-15) and the
// SNR of the output against the model (error power relative to signal
// power), and checks per variant (LSB = 2^-15):
//   RND_TRUNC : max |error| <= 1.1 LSB,  mean error in [-0.6, -0.4] LSB
//   RND_LAST  : max |error| <= 0.55 LSB, |mean error| <= 0.05 LSB
//   RND_ALL   : max |error| <= 0.55 LSB, |mean error| <= 0.05 LSB
// and SNR >= 88 dB (truncation) or >= 94 dB (rounding). Half an LSB is the
// error expected from the final reduction to 16 bits alone.
module tb_decimation_accuracy;
  timeunit 1ns; timeprecision 100ps;
  import decim_pkg::*;
  import decim_ref_pkg::*;

  localparam int LANES = 8;
  logic    clk = 0;
  logic    rst = 1;
  sample_t signal [LANES];
  rinv_t   r_inverse;
  shift_t  shift;
  scale_t  scale_factor;
  sample_t data_out [3][LANES/2];
  logic    out_valid [3];
  int      checks = 0, failures = 0;
  longint  outq [3][$];

  decimation #(.ROUNDING(RND_TRUNC)) dut_t (.clk, .rst, .signal, .r_inverse, .shift,
    .scale_factor, .data_out(data_out[0]), .out_valid(out_valid[0]));
  decimation #(.ROUNDING(RND_LAST)) dut_l (.clk, .rst, .signal, .r_inverse, .shift,
    .scale_factor, .data_out(data_out[1]), .out_valid(out_valid[1]));
  decimation #(.ROUNDING(RND_ALL)) dut_a (.clk, .rst, .signal, .r_inverse, .shift,
    .scale_factor, .data_out(data_out[2]), .out_valid(out_valid[2]));
  always #1 clk = ~clk;

  initial begin
    #4000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk)
    for (int v = 0; v < 3; v++)
      if (out_valid[v] && !rst)
        for (int j = 0; j < LANES/2; j++) outq[v].push_back(longint'(data_out[v][j]));

  function automatic void check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL %s", msg);
    end
  endfunction

  // Floating-point transposed Farrow + halfband on the quantised input.
  function automatic void float_model(input q_t x, input longint r, output real o[$]);
    real mu_c, acc[NBR], vq[NBR][$], y[$], hb_s[$], u, rr;
    longint mu, s;
    rr = 65536.0 / real'(r);
    mu = 0;
    for (int m = 0; m < int'(NBR); m++) acc[m] = 0.0;
    foreach (x[k]) begin
      s = mu + r;
      mu = s % 65536;
      mu_c = 2.0 * real'(mu) / 65536.0 - 1.0;
      u = real'(x[k]) / 32768.0;
      for (int m = 0; m < int'(NBR); m++) begin
        if (s >= 65536) begin vq[m].push_back(acc[m]); acc[m] = u; end
        else acc[m] += u;
        u = u * mu_c;
      end
    end
    for (int l = 0; l < vq[0].size(); l++) begin
      real t;
      t = 0.0;
      for (int n = 0; n < int'(NTAP); n++)
        if (l - 7 + n >= 0)
          for (int m = 0; m < int'(NBR); m++)
            t += real'(farrow_coef(m, n)) / 32768.0 * vq[m][l - 7 + n];
      y.push_back(t / rr);
    end
    for (int l = LANES; l < y.size(); l++) hb_s.push_back(y[l]);
    o = {};
    for (int q = 0; 2*q + 1 < hb_s.size(); q++) begin
      real a;
      a = 0.0;
      for (int i = 0; i < int'(HB_NODD); i++)
        if (q - i >= 0) a += real'(hb_coef(i)) / 32768.0 * hb_s[2*(q-i)];
      if (q >= 12) a += 0.5 * hb_s[2*(q-12)+1];
      o.push_back(a);
    end
  endfunction

  task automatic run_r(input real R);
    longint r, sf;
    int d, nw, skip;
    q_t xs;
    real fo[$], fin;
    string name [3] = '{"trunc", "last ", "all  "};
    settings(R, r, d, sf);
    r_inverse = rinv_t'(r); shift = shift_t'(d); scale_factor = scale_t'(sf);
    rst = 1;
    for (int i = 0; i < LANES; i++) signal[i] = '0;
    repeat (4) @(posedge clk);
    for (int v = 0; v < 3; v++) outq[v] = {};
    #0.1 rst = 0;
    // input frequency 0.13 of the output rate, in cycles per input sample
    fin = 0.13 / (2.0 * 65536.0 / real'(r));
    nw = int'(real'(200 + 60) * 65536.0 / real'(r)) + 40;
    for (int w = 0; w < nw; w++) begin
      for (int i = 0; i < LANES; i++) begin
        longint s;
        s = longint'($floor(0.9 * 32767.0 * $sin(2.0 * 3.14159265358979 * fin * real'(w * LANES + i)) + 0.5));
        signal[i] = sample_t'(s);
        xs.push_back(s);
      end
      @(posedge clk); #0.1;
    end
    repeat (40) @(posedge clk);
    for (int i = 0; i < 40 * LANES; i++) xs.push_back(xs[xs.size() - 1]);
    float_model(xs, r, fo);
    // skip the start-up transient of the halfband (first 12 outputs)
    skip = 12;
    for (int v = 0; v < 3; v++) begin
      q_t vv[NBR], y, z, ref_out;
      real err, sum_e, max_e, pe, ps, snr, mean;
      int n;
      // bit-exact against the reference model with the same rounding
      ref_accumulate(xs, r, d, vv, v);
      y = ref_farrow(vv, v);
      for (int l = LANES; l < y.size(); l++) z.push_back(ref_scale(y[l], sf, v));
      ref_out = ref_halfband(z, v);
      check(outq[v].size() >= skip + 400 && outq[v].size() <= ref_out.size(),
            $sformatf("%s R=%f output count %0d", name[v], R, outq[v].size()));
      for (int i = 0; i < outq[v].size() && i < ref_out.size(); i++)
        check(outq[v][i] == ref_out[i], $sformatf("%s R=%f out[%0d]=%0d expected %0d",
              name[v], R, i, outq[v][i], ref_out[i]));
      // accuracy against the floating-point model
      sum_e = 0.0; max_e = 0.0; pe = 0.0; ps = 0.0;
      n = outq[v].size() - skip;
      for (int k = skip; k < outq[v].size(); k++) begin
        err = real'(outq[v][k]) / 32768.0 - fo[k];
        sum_e += err;
        if (err > max_e) max_e = err;
        if (-err > max_e) max_e = -err;
        pe += err * err;
        ps += fo[k] * fo[k];
      end
      snr  = 10.0 * $log10(ps / pe);
      mean = sum_e / real'(n) * 32768.0;
      $display("%s R=%8.3f (realised %10.5f): %0d outputs, mean err %9.2e (%5.2f LSB), max err %8.2e (%4.2f LSB), SNR %5.2f dB",
               name[v], R, 65536.0 / real'(r), n, sum_e / real'(n), mean, max_e, max_e * 32768.0, snr);
      case (v)
        0: begin
          check(max_e * 32768.0 <= 1.1, $sformatf("%s R=%f max error", name[v], R));
          check(mean >= -0.6 && mean <= -0.4, $sformatf("%s R=%f mean error", name[v], R));
          check(snr >= 88.0, $sformatf("%s R=%f SNR", name[v], R));
        end
        default: begin
          check(max_e * 32768.0 <= 0.55, $sformatf("%s R=%f max error", name[v], R));
          check(mean >= -0.05 && mean <= 0.05, $sformatf("%s R=%f mean error", name[v], R));
          check(snr >= 94.0, $sformatf("%s R=%f SNR", name[v], R));
        end
      endcase
    end
  endtask

  initial begin
    run_r(2.0);
    run_r(3.45);
    run_r(4.0);
    run_r(50.0);
    run_r(107.89);
    run_r(1035.02);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
