// tb_keystream_randomness: NIST SP 800-22 statistical tests on the keystream
// of the default 128-bit configuration.
//
// A fixed key and IVs are loaded and 7813 keystream words (1,000,064 bits,
// bit 0 of each word first) are collected from the ciphertext of an all-zero
// plaintext, one word per clock (checked). The ten tests below are applied
// with the parameters NIST recommends for 10^6-bit sequences, at
// significance level 0.01; a test passes when its p-value is above 0.01.
//   frequency               p = erfc(|S_n| / sqrt(2n))
//   block frequency         M = 12800 (78 blocks)
//   runs                    (with its frequency prerequisite)
//   longest run of ones     M = 10000, 100 blocks, 7 classes
//   linear complexity       M = 500, 2000 blocks, Berlekamp-Massey per block
//   approximate entropy     m = 10
//   Maurer universal        L = 7, Q = 1280
//   cumulative sums         forward mode
//   overlapping template    m = 9 (all ones), M = 1032, 968 blocks
//   serial                  m = 16, both p-values
// erfc uses the Abramowitz-Stegun 7.1.26 approximation (error < 1.5e-7);
// the upper regularised incomplete gamma function igamc uses the usual
// series / continued-fraction pair with a Lanczos log-gamma.
module tb_keystream_randomness;
  localparam int N     = 128;
  localparam int NW    = 7813;
  localparam int NBITS = NW * N;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, load, pt_valid, ct_valid, lfsr_step;
  logic [N-1:0] key, lfsr_iv, crc_iv, ct, ks;

  crc_stream_cipher dut (
    .clk, .rst_n, .load, .key, .lfsr_iv, .crc_iv, .pt_valid, .pt('0),
    .ct_valid, .ct, .ks, .lfsr_step);

  bit eps [NBITS];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- numerical helpers ----------------
  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic real erfc(input real x);
    real t, y, ax;
    ax = fabs(x);
    t = 1.0 / (1.0 + 0.3275911 * ax);
    y = t * (0.254829592 + t * (-0.284496736 + t * (1.421413741
        + t * (-1.453152027 + t * 1.061405429))));
    y = y * $exp(-ax * ax);
    return (x < 0.0) ? 2.0 - y : y;
  endfunction

  // standard normal distribution function
  function automatic real phi(input real x);
    return 0.5 * erfc(-x / $sqrt(2.0));
  endfunction

  function automatic real lgamma(input real xx);
    real cof [6] = '{76.18009172947146, -86.50532032941677, 24.01409824083091,
                     -1.231739572450155, 0.1208650973866179e-2, -0.5395239384953e-5};
    real x, y, tmp, ser;
    x = xx; y = xx;
    tmp = x + 5.5;
    tmp = tmp - (x + 0.5) * $ln(tmp);
    ser = 1.000000000190015;
    for (int j = 0; j < 6; j++) begin
      y = y + 1.0;
      ser = ser + cof[j] / y;
    end
    return -tmp + $ln(2.5066282746310005 * ser / x);
  endfunction

  // Q(a, x) = upper regularised incomplete gamma function
  function automatic real igamc(input real a, input real x);
    real gln, ap, del, sum, b, c, d, h, an;
    gln = lgamma(a);
    if (x <= 0.0) return 1.0;
    if (x < a + 1.0) begin
      ap = a; del = 1.0 / a; sum = del;
      for (int n = 1; n < 200000; n++) begin
        ap = ap + 1.0;
        del = del * x / ap;
        sum = sum + del;
        if (fabs(del) < fabs(sum) * 1.0e-15) break;
      end
      return 1.0 - sum * $exp(-x + a * $ln(x) - gln);
    end
    b = x + 1.0 - a; c = 1.0e300; d = 1.0 / b; h = d;
    for (int i = 1; i < 200000; i++) begin
      an = -i * (i - a);
      b = b + 2.0;
      d = an * d + b;
      if (fabs(d) < 1.0e-300) d = 1.0e-300;
      c = b + an / c;
      if (fabs(c) < 1.0e-300) c = 1.0e-300;
      d = 1.0 / d;
      del = d * c;
      h = h * del;
      if (fabs(del - 1.0) < 1.0e-15) break;
    end
    return $exp(-x + a * $ln(x) - gln) * h;
  endfunction

  // ---------------- the tests ----------------
  function automatic real t_frequency();
    longint s = 0;
    for (int i = 0; i < NBITS; i++) s += eps[i] ? 1 : -1;
    return erfc(fabs(real'(s)) / $sqrt(2.0 * NBITS));
  endfunction

  function automatic real t_block_frequency();
    localparam int M = 12800;
    int nb, ones;
    real chi2;
    nb = NBITS / M;
    chi2 = 0.0;
    for (int b = 0; b < nb; b++) begin
      ones = 0;
      for (int i = 0; i < M; i++) ones += int'(eps[b*M + i]);
      chi2 = chi2 + (real'(ones) / M - 0.5) ** 2;
    end
    chi2 = 4.0 * M * chi2;
    return igamc(nb / 2.0, chi2 / 2.0);
  endfunction

  function automatic real t_runs(output bit prereq);
    longint ones = 0, v = 1;
    real p1;
    for (int i = 0; i < NBITS; i++) begin
      ones += longint'(eps[i]);
      if (i > 0 && eps[i] != eps[i-1]) v++;
    end
    p1 = real'(ones) / NBITS;
    prereq = fabs(p1 - 0.5) < 2.0 / $sqrt(real'(NBITS));
    return erfc(fabs(v - 2.0 * NBITS * p1 * (1.0 - p1))
                / (2.0 * $sqrt(2.0 * NBITS) * p1 * (1.0 - p1)));
  endfunction

  function automatic real t_longest_run();
    localparam int M = 10000;
    localparam int NB = 100;
    real pi [7] = '{0.0882, 0.2092, 0.2483, 0.1933, 0.1208, 0.0675, 0.0727};
    int v [7];
    int run, best, cls;
    real chi2;
    foreach (v[i]) v[i] = 0;
    for (int b = 0; b < NB; b++) begin
      run = 0; best = 0;
      for (int i = 0; i < M; i++) begin
        run = eps[b*M + i] ? run + 1 : 0;
        if (run > best) best = run;
      end
      cls = (best <= 10) ? 0 : (best >= 16) ? 6 : best - 10;
      v[cls]++;
    end
    chi2 = 0.0;
    for (int i = 0; i < 7; i++) chi2 = chi2 + (v[i] - NB * pi[i]) ** 2 / (NB * pi[i]);
    return igamc(3.0, chi2 / 2.0);
  endfunction

  function automatic real t_linear_complexity();
    localparam int M = 500;
    real pi [7] = '{0.010417, 0.03125, 0.125, 0.5, 0.25, 0.0625, 0.020833};
    int v [7];
    int nb, L, m, cls;
    logic [M:0] C, B, T, w;
    bit d;
    real mu, t, chi2;
    nb = NBITS / M;
    mu = M / 2.0 + (9.0 + 1.0) / 36.0 - (M / 3.0 + 2.0 / 9.0) / (2.0 ** M);
    foreach (v[i]) v[i] = 0;
    for (int b = 0; b < nb; b++) begin
      C = 1; B = 1; L = 0; m = -1; w = '0;
      for (int n = 0; n < M; n++) begin
        w = {w[M-1:0], eps[b*M + n]};      // w[i] = s[n-i]
        d = ^(C & w);
        if (d) begin
          T = C;
          C = C ^ (B << (n - m));
          if (2 * L <= n) begin
            L = n + 1 - L;
            m = n;
            B = T;
          end
        end
      end
      t = L - mu + 2.0 / 9.0;               // M even: (-1)^M = 1
      cls = (t <= -2.5) ? 0 : (t <= -1.5) ? 1 : (t <= -0.5) ? 2 : (t <= 0.5) ? 3 :
            (t <= 1.5) ? 4 : (t <= 2.5) ? 5 : 6;
      v[cls]++;
    end
    chi2 = 0.0;
    for (int i = 0; i < 7; i++) chi2 = chi2 + (v[i] - nb * pi[i]) ** 2 / (nb * pi[i]);
    return igamc(3.0, chi2 / 2.0);
  endfunction

  // sum over all overlapping m-bit patterns (with wrap-around) of c*ln(c/n)
  function automatic real apen_phi(input int m);
    int cnt [];
    int idx;
    real s;
    cnt = new[1 << m];
    foreach (cnt[i]) cnt[i] = 0;
    for (int i = 0; i < NBITS; i++) begin
      idx = 0;
      for (int k = 0; k < m; k++) idx = (idx << 1) | int'(eps[(i + k) % NBITS]);
      cnt[idx]++;
    end
    s = 0.0;
    foreach (cnt[i])
      if (cnt[i] > 0) s = s + (real'(cnt[i]) / NBITS) * $ln(real'(cnt[i]) / NBITS);
    return s;
  endfunction

  function automatic real t_approx_entropy();
    localparam int m = 10;
    real apen, chi2;
    apen = apen_phi(m) - apen_phi(m + 1);
    chi2 = 2.0 * NBITS * ($ln(2.0) - apen);
    return igamc(2.0 ** (m - 1), chi2 / 2.0);
  endfunction

  function automatic real t_maurer();
    localparam int L = 7;
    localparam int Q = 1280;
    int K, tab [1 << L], val;
    real sum, fn, c, sigma;
    K = NBITS / L - Q;
    foreach (tab[i]) tab[i] = 0;
    for (int i = 1; i <= Q; i++) begin
      val = 0;
      for (int k = 0; k < L; k++) val = (val << 1) | int'(eps[(i-1)*L + k]);
      tab[val] = i;
    end
    sum = 0.0;
    for (int i = Q + 1; i <= Q + K; i++) begin
      val = 0;
      for (int k = 0; k < L; k++) val = (val << 1) | int'(eps[(i-1)*L + k]);
      sum = sum + $ln(real'(i - tab[val])) / $ln(2.0);
      tab[val] = i;
    end
    fn = sum / K;
    c = 0.7 - 0.8 / L + (4.0 + 32.0 / L) * (real'(K) ** (-3.0 / L)) / 15.0;
    sigma = c * $sqrt(3.125 / K);
    return erfc(fabs(fn - 6.1962507) / ($sqrt(2.0) * sigma));
  endfunction

  function automatic real t_cusum();
    longint s = 0, z = 0;
    real n, sn, sum1, sum2;
    n = NBITS;
    for (int i = 0; i < NBITS; i++) begin
      s += eps[i] ? 1 : -1;
      if (s > z) z = s;
      if (-s > z) z = -s;
    end
    sn = $sqrt(n);
    sum1 = 0.0;
    for (int k = $rtoi((-n / z + 1.0) / 4.0); k <= $rtoi((n / z - 1.0) / 4.0); k++)
      sum1 = sum1 + phi((4.0 * k + 1.0) * z / sn) - phi((4.0 * k - 1.0) * z / sn);
    sum2 = 0.0;
    for (int k = $rtoi((-n / z - 3.0) / 4.0); k <= $rtoi((n / z - 1.0) / 4.0); k++)
      sum2 = sum2 + phi((4.0 * k + 3.0) * z / sn) - phi((4.0 * k + 1.0) * z / sn);
    return 1.0 - sum1 + sum2;
  endfunction

  function automatic real t_overlapping_template();
    localparam int m = 9;
    localparam int M = 1032;
    localparam int NB = 968;
    real pi [6] = '{0.364091, 0.185659, 0.139381, 0.100571, 0.0704323, 0.139865};
    int v [6];
    int w, run;
    real chi2;
    foreach (v[i]) v[i] = 0;
    for (int b = 0; b < NB; b++) begin
      w = 0; run = 0;
      for (int i = 0; i < M; i++) begin
        run = eps[b*M + i] ? run + 1 : 0;
        if (run >= m) w++;              // a run of ones ending here covers the template
      end
      v[(w > 5) ? 5 : w]++;
    end
    chi2 = 0.0;
    for (int i = 0; i < 6; i++) chi2 = chi2 + (v[i] - NB * pi[i]) ** 2 / (NB * pi[i]);
    return igamc(5.0 / 2.0, chi2 / 2.0);
  endfunction

  function automatic real psi2(input int m);
    int cnt [];
    int idx, mask;
    real s;
    if (m == 0) return 0.0;
    cnt = new[1 << m];
    foreach (cnt[i]) cnt[i] = 0;
    mask = (1 << m) - 1;
    idx = 0;
    for (int k = 0; k < m - 1; k++) idx = (idx << 1) | int'(eps[k]);
    for (int i = 0; i < NBITS; i++) begin
      idx = ((idx << 1) | int'(eps[(i + m - 1) % NBITS])) & mask;
      cnt[idx]++;
    end
    s = 0.0;
    foreach (cnt[i]) s = s + real'(cnt[i]) * cnt[i];
    return s * (2.0 ** m) / NBITS - NBITS;
  endfunction

  task automatic t_serial(output real p1, output real p2);
    localparam int m = 16;
    real a, b, c;
    a = psi2(m); b = psi2(m - 1); c = psi2(m - 2);
    p1 = igamc(2.0 ** (m - 2), (a - b) / 2.0);
    p2 = igamc(2.0 ** (m - 3), (a - 2.0 * b + c) / 2.0);
  endtask

  initial begin
    repeat (NW + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic report(input string name, input real p);
    $display("%-24s p = %f  %s", name, p, (p > 0.01) ? "pass" : "FAIL");
    check(p > 0.01 && p <= 1.0, name);
  endtask

  initial begin
    int words, cycles, n;
    bit pre;
    real p1, p2;
    rst_n = 0; load = 0; pt_valid = 0;
    key = 128'h0123_4567_89AB_CDEF_FEDC_BA98_7654_3210;
    lfsr_iv = 128'h0; crc_iv = 128'h5555_AAAA_0F0F_F0F0_3333_CCCC_FF00_00FF;
    #12 rst_n = 1;
    @(negedge clk);
    load = 1;
    @(negedge clk);
    load = 0;

    words = 0; cycles = 0; n = 0;
    pt_valid = 1;
    while (words < NW) begin
      @(negedge clk);
      cycles++;
      if (words == NW - 1) pt_valid = 0;
      if (ct_valid) begin
        words++;
        for (int i = 0; i < N; i++) eps[n + i] = ct[i];
        n += N;
      end
    end
    check(cycles == NW, $sformatf("one word per clock: %0d words in %0d cycles", NW, cycles));

    // sanity checks of the numerical helpers against tabulated values
    check(fabs(erfc(1.0) - 0.157299) < 1e-5, "erfc(1)");
    check(fabs(igamc(3.0, 5.0) - 0.124652) < 1e-5, "igamc(3,5)");
    check(fabs(igamc(2.0, 1.0) - 0.735759) < 1e-5, "igamc(2,1)");

    report("runs",                 t_runs(pre));
    check(pre, "runs prerequisite");
    report("frequency",            t_frequency());
    report("longest run of ones",  t_longest_run());
    report("linear complexity",    t_linear_complexity());
    report("approximate entropy",  t_approx_entropy());
    report("Maurer universal",     t_maurer());
    report("cumulative sums",      t_cusum());
    report("block frequency",      t_block_frequency());
    report("overlapping template", t_overlapping_template());
    t_serial(p1, p2);
    report("serial (1)",           p1);
    report("serial (2)",           p2);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
