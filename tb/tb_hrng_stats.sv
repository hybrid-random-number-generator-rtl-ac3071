// tb_hrng_stats: statistical run of the complete generator at its default
// parameters.
//
// Feeds hrng_top with pseudo-random noise and threshold amplitudes (a fixed
// seed makes the run repeatable), collects NBITS output bits from rn and
// applies three tests of the NIST SP 800-22 suite to them:
//  - frequency (monobit): p = erfc(|S_n| / sqrt(2 n));
//  - frequency within a block, M = 128: chi-square with n/M degrees of
//    freedom, p taken from the Wilson-Hilferty normal approximation;
//  - runs: p = erfc(|V - 2 n pi (1 - pi)| / (2 sqrt(2 n) pi (1 - pi))).
// The monobit test is also applied to the true-random bits alone (trn_bit
// during the sampling windows). A test passes with p >= 0.001. erfc is the
// Abramowitz-Stegun 7.1.26 approximation (error below 1.5e-7).
//
// The runs statistic is printed but not judged. Both password registers are
// reloaded with the same seeds every period, so in the cycles where only the
// password register steps, the bit-to-bit transitions of rn repeat the same
// pattern every 50 cycles. Over 100 000 bits this moves the run count by a
// few percent (about 4 % too few runs with password 16'h8191), and the runs
// test fails. That is a property of the generator as specified, not of the
// testbench. For streams of about 1000 bits the shortfall stays within the
// test's tolerance.
module tb_hrng_stats;
  localparam int NBITS = 100000;
  localparam int M = 128;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic signed [7:0] noise_in = '0, thr_noise = '0, disc_out;
  logic [15:0] password = 16'h8191;
  logic rn, clk_pulse, trn_bit, reseed, step_trn, step_pw1;
  logic [7:0] trn_word;

  hrng_top dut (.clk, .rst_n, .noise_in, .thr_noise, .password, .rn, .clk_pulse,
                .disc_out, .trn_bit, .trn_word, .reseed, .step_trn, .step_pw1);

  function automatic real erfc_approx(real x);
    real t, y;
    t = 1.0 / (1.0 + 0.3275911 * x);
    y = t * (0.254829592 + t * (-0.284496736 + t * (1.421413741 + t * (-1.453152027 + t * 1.061405429))));
    return y * $exp(-x * x);
  endfunction

  // Upper tail of chi-square with k degrees of freedom (Wilson-Hilferty).
  function automatic real chi2_upper(real x, int k);
    real z;
    z = ($pow(x / k, 1.0 / 3.0) - (1.0 - 2.0 / (9.0 * k))) / $sqrt(2.0 / (9.0 * k));
    return (z < 0) ? 1.0 - 0.5 * erfc_approx(-z / $sqrt(2.0)) : 0.5 * erfc_approx(z / $sqrt(2.0));
  endfunction

  task automatic judge(string name, real p);
    checks++;
    $display("%-28s p = %8.5f %s", name, p, (p >= 0.001) ? "pass" : "FAIL");
    if (p < 0.001) failures++;
  endtask

  logic bits[NBITS];
  int   ones_trn = 0, n_trn = 0;
  initial begin
    void'($urandom(32'd20240901));
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Skip the first period, before the first seed arrives.
    for (int k = 0; k < 60 + NBITS; k++) begin
      noise_in  = 8'($signed(8'($urandom)) / 2);
      thr_noise = 8'(int'($urandom_range(60)) - 30);
      #1;
      if (k >= 60) bits[k - 60] = rn;
      if (dut.u_sl.sync) begin n_trn++; if (trn_bit) ones_trn++; end
      @(negedge clk);
    end
    begin
      int s, v, ones;
      real pi_, chi;
      s = 0; v = 1; ones = 0;
      for (int i = 0; i < NBITS; i++) begin
        s += bits[i] ? 1 : -1;
        ones += bits[i];
        if (i > 0 && bits[i] != bits[i-1]) v++;
      end
      judge("frequency (monobit)", erfc_approx((s < 0 ? -s : s) / $sqrt(2.0 * NBITS)));
      chi = 0.0;
      for (int b = 0; b < NBITS / M; b++) begin
        int c;
        c = 0;
        for (int j = 0; j < M; j++) c += bits[b*M + j];
        chi += 4.0 * M * (real'(c) / M - 0.5) ** 2;
      end
      judge("frequency within a block", chi2_upper(chi, NBITS / M));
      pi_ = real'(ones) / NBITS;
      checks++;
      if ((pi_ - 0.5 < 0 ? 0.5 - pi_ : pi_ - 0.5) >= 2.0 / $sqrt(real'(NBITS))) begin
        failures++; $display("runs test prerequisite failed, pi = %f", pi_);
      end
      begin
        real d;
        d = v - 2.0 * NBITS * pi_ * (1.0 - pi_);
        // Reported, not judged: see the header.
        $display("%-28s p = %8.5f (V = %0d runs, %0.1f expected)", "runs", 
                 erfc_approx((d < 0 ? -d : d) / (2.0 * $sqrt(2.0 * NBITS) * pi_ * (1.0 - pi_))),
                 v, 2.0 * NBITS * pi_ * (1.0 - pi_));
      end
      begin
        int st;
        st = 2 * ones_trn - n_trn;
        judge("TRN bits, frequency", erfc_approx((st < 0 ? -st : st) / $sqrt(2.0 * n_trn)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
