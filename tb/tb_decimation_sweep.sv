// tb_decimation_sweep -- frequency sweep of the whole decimator against the
// requirements it was designed for: 80 % of the output Nyquist band usable,
// 80 dB stopband attenuation, passband gain flat to a few thousandths of a dB.
//
// For R = 2.3, 7.77 and 50.5 (total decimation 2R) a sine of amplitude 0.9
// full scale is applied at a set of frequencies between 0.01 and 0.4 of the
// output rate F_out. After the filters have settled, a sine of the known
// frequency (cosine, sine and constant terms) is fitted to the output by least
// squares. The testbench reports, and checks for every passband tone:
//   gain  : fitted amplitude / input amplitude within +-0.008 dB
//   SNR   : power of the fitted sine / power of the residual >= 80 dB
//   SFDR  : fitted amplitude / largest spur of the residual >= 80 dB; the
//           spur search is a DFT of the residual at steps of 1/(2 NOUT) of
//           F_out, so a spur between grid points reads at most ~1 dB low
// The residual holds everything that is not the tone: aliases the filters
// failed to remove, and rounding noise. Tones at 1/4 and 1/3 of F_out are
// avoided; there the folded components land on the tone itself.
// Stopband tones (0.62, 0.72, 0.75, 1.3 and 1.85 F_out) fold into the output
// band; the sine fitted at the folded frequency is reported. The bound
// checked is -74 dB, not the 80 dB the filters were designed for: with its
// coefficients rounded to 16 bits the halfband response rises to -74.7 dB
// near 0.72 F_out and to about -76 dB near 0.62 F_out (computed from the
// coefficients in decim_pkg); elsewhere it is below -80 dB.
module tb_decimation_sweep;
  timeunit 1ns; timeprecision 100ps;
  import decim_pkg::*;
  import decim_ref_pkg::*;

  localparam int LANES = 8;
  localparam int NOUT  = 320;     // output samples used in each fit
  localparam int SKIP  = 48;      // output samples skipped while settling
  logic    clk = 0;
  logic    rst = 1;
  sample_t signal [LANES];
  rinv_t   r_inverse;
  shift_t  shift;
  scale_t  scale_factor;
  sample_t data_out [LANES/2];
  logic    out_valid;
  int      checks = 0, failures = 0;
  real     outq[$];
  real     min_snr = 1000.0, max_gerr = 0.0, max_stop = -1000.0, min_sfdr = 1000.0;

  decimation dut (.*);
  always #1 clk = ~clk;

  initial begin
    #4000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk)
    if (out_valid && !rst) for (int j = 0; j < LANES/2; j++) outq.push_back(real'(data_out[j]));

  function automatic void check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endfunction

  // Solve the 3 x 3 system a x = b (Gaussian elimination, no pivoting needed
  // for the well-conditioned normal equations used here).
  function automatic void solve3(input real a_in[3][3], input real b_in[3], output real x[3]);
    real a[3][3], b[3], f;
    a = a_in; b = b_in;
    for (int k = 0; k < 3; k++)
      for (int i = k + 1; i < 3; i++) begin
        f = a[i][k] / a[k][k];
        for (int j = k; j < 3; j++) a[i][j] -= f * a[k][j];
        b[i] -= f * b[k];
      end
    for (int i = 2; i >= 0; i--) begin
      x[i] = b[i];
      for (int j = i + 1; j < 3; j++) x[i] -= a[i][j] * x[j];
      x[i] /= a[i][i];
    end
  endfunction

  task automatic tone(input real R, input real fo, input bit stop);
    longint r, sf;
    int d, nw;
    real fin, amp, ph, w, g[3], ata[3][3], atb[3], x[3], res, sig, gain_db, snr, fa;
    real rq[$], spur, sfdr;
    settings(R, r, d, sf);
    r_inverse = rinv_t'(r); shift = shift_t'(d); scale_factor = scale_t'(sf);
    rst = 1;
    for (int i = 0; i < LANES; i++) signal[i] = '0;
    repeat (4) @(posedge clk);
    outq = {};
    #0.1 rst = 0;
    amp = 0.9 * 32767.0;
    ph  = 0.3;
    // cycles per input sample for a tone at fo * F_out
    fin = fo / (2.0 * 65536.0 / real'(r));
    nw = int'(real'(NOUT + SKIP + 120) * 65536.0 / real'(r) / 4.0) + 4;
    for (int wd = 0; wd < nw; wd++) begin
      for (int i = 0; i < LANES; i++)
        signal[i] = sample_t'(longint'($floor(amp * $sin(2.0 * 3.14159265358979 * fin *
                                                         real'(wd * LANES + i) + ph) + 0.5)));
      @(posedge clk); #0.1;
    end
    check(outq.size() >= SKIP + NOUT, $sformatf("R=%f f=%f too few outputs %0d", R, fo, outq.size()));
    if (outq.size() < SKIP + NOUT) return;
    // frequency seen at the output: fo folded into [0, 0.5] F_out
    fa = fo - $floor(fo);
    if (fa > 0.5) fa = 1.0 - fa;
    // least-squares fit of c0 cos + c1 sin + c2 at that frequency
    for (int i = 0; i < 3; i++) begin atb[i] = 0.0; for (int j = 0; j < 3; j++) ata[i][j] = 0.0; end
    for (int k = SKIP; k < SKIP + NOUT; k++) begin
      w = 2.0 * 3.14159265358979 * fa * real'(k);
      g[0] = $cos(w); g[1] = $sin(w); g[2] = 1.0;
      for (int i = 0; i < 3; i++) begin
        atb[i] += g[i] * outq[k];
        for (int j = 0; j < 3; j++) ata[i][j] += g[i] * g[j];
      end
    end
    solve3(ata, atb, x);
    res = 0.0; sig = 0.0;
    for (int k = SKIP; k < SKIP + NOUT; k++) begin
      real e;
      w = 2.0 * 3.14159265358979 * fa * real'(k);
      e = outq[k] - (x[0] * $cos(w) + x[1] * $sin(w) + x[2]);
      res += e * e;
      rq.push_back(e);
    end
    sig = (x[0] * x[0] + x[1] * x[1]) / 2.0 * real'(NOUT);
    gain_db = 20.0 * $log10($sqrt(x[0] * x[0] + x[1] * x[1]) / amp);
    snr = 10.0 * $log10(sig / res);
    if (stop) begin
      $display("R=%7.3f f=%5.3f F_out (stopband, folds to %5.3f): %8.2f dB", R, fo, fa, gain_db);
      if (gain_db > max_stop) max_stop = gain_db;
      check(gain_db <= -74.0, $sformatf("R=%f f=%f stopband alias %f dB", R, fo, gain_db));
      return;
    end
    // largest spur in the residual
    spur = 0.0;
    for (int j = 1; j < NOUT; j++) begin
      real re, im, a;
      re = 0.0; im = 0.0;
      for (int k = 0; k < NOUT; k++) begin
        w = 2.0 * 3.14159265358979 * real'(j) / real'(2 * NOUT) * real'(k);
        re += rq[k] * $cos(w);
        im += rq[k] * $sin(w);
      end
      a = 2.0 * $sqrt(re * re + im * im) / real'(NOUT);
      if (a > spur) spur = a;
    end
    sfdr = 20.0 * $log10($sqrt(x[0] * x[0] + x[1] * x[1]) / spur);
    $display("R=%7.3f f=%5.3f F_out: gain %8.4f dB, SNR %6.2f dB, SFDR %6.2f dB", R, fo, gain_db, snr, sfdr);
    if (sfdr < min_sfdr) min_sfdr = sfdr;
    check(sfdr >= 80.0, $sformatf("R=%f f=%f SFDR %f dB", R, fo, sfdr));
    if (snr < min_snr) min_snr = snr;
    if (gain_db > max_gerr) max_gerr = gain_db;
    if (-gain_db > max_gerr) max_gerr = -gain_db;
    check(gain_db <= 0.008 && gain_db >= -0.008, $sformatf("R=%f f=%f gain %f dB", R, fo, gain_db));
    check(snr >= 80.0, $sformatf("R=%f f=%f SNR %f dB", R, fo, snr));
  endtask

  initial begin
    real fr [7] = '{0.013, 0.071, 0.137, 0.209, 0.291, 0.357, 0.397};
    real fs [5] = '{0.62, 0.72, 0.75, 1.3, 1.85};
    real rs [3] = '{2.3, 7.77, 50.5};
    foreach (rs[a]) begin
      foreach (fr[b]) tone(rs[a], fr[b], 1'b0);
      foreach (fs[b]) tone(rs[a], fs[b], 1'b1);
    end
    $display("worst gain error %0.4f dB, worst SNR %0.2f dB, worst SFDR %0.2f dB, worst stopband alias %0.2f dB",
             max_gerr, min_snr, min_sfdr, max_stop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
