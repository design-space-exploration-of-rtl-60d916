// tb_interp_workload: interpolation-error workload for the quadratic
// interpolator with and without the compensation filter.
//
// This reproduces, on the fixed-point RTL, the kind of evaluation used to choose
// the interpolator: a block of 5000 pseudo-random QAM-16 symbols, raised-cosine
// shaped (rolloff 0.2, i.e. transmit and matched filter together) and sampled at
// K = 3 samples per symbol, is interpolated at 10 fractional delays
// mu = 0.0, 0.1, ... 0.9, with mu always set to the value that lands exactly on
// the symbol instants. The residual error at the symbol instants is then pure
// interpolation ISI. One dimension (the in-phase rail) is enough, because the
// two rails of QAM-16 are independent.
//
// Stimulus: x[n] = round(A * sum_j a_j * rc((n + mu)/3 - j)), a_j in {-3,-1,1,3},
// A = 80 LSB (peaks of the shaped signal reach about 6A), rc truncated to +-12
// symbols. The interpolator output at the sample whose delay lands on symbol j
// is compared with A * a_j.
//
// Checks:
//  * every sample of the interpolator output and of the compensated chain
//    (interpolator -> compensation filter) matches a real-valued model of the
//    same arithmetic (Lagrange parabola, then the FIR with COMP_COEF / 256)
//    within 3 LSB, with latencies of 1 and 3 cycles;
//  * symbol j sits at sample 3j + 1 of the interpolator output and 3j + 3 of
//    the compensated output;
//  * every symbol is decided correctly with and without compensation;
//  * over the 10 delays, the worst peak ISI and the worst rms ISI are smaller
//    with the compensation filter than without it.
// The alignment is also found by a search over a few candidate offsets, and the
// search must return the expected ones.
// A per-delay table of peak and rms ISI in percent of A is printed.
//
// Eb/N0 loss (quasi-analytic): for each delay the symbol-instant errors are
// combined analytically with Gaussian noise. Per rail, a +-1 symbol errs when
// the noise crosses either neighbouring threshold, a +-3 symbol only towards the
// inside; with Gray coding each such error costs one of the rail's two bits.
// The noise deviation that gives a bit error rate of 1e-6 is found by bisection,
// with and without the interpolation errors, and the ratio is the loss in dB.
// This is computed for the RTL outputs and for a floating-point model of the
// same filters on the unquantised signal. Checks: the fixed-point loss exceeds
// the floating-point loss by at most 0.03 dB at every delay, and compensation
// lowers the worst-case loss over the 10 delays.
module tb_interp_workload;
  import stadj_pkg::*;

  localparam int NSYM  = 5000;
  localparam int NMU   = 10;
  localparam int NS    = NSYM * K;
  localparam int SPAN  = 12;                 // raised-cosine truncation, symbols
  localparam real BETA = 0.2;
  localparam real PI   = 3.14159265358979323846;
  localparam int TOL   = 3;                  // LSB, fixed point against real model
  localparam int AMP   = 80;                 // symbol level A, in LSB
  localparam real PE_TARGET = 1.0e-6;             // bit error rate for the loss figure
  localparam real DG_TOL    = 0.03;               // dB, fixed point against floating point

  logic clk;
  logic rst_n = 1'b0;
  sample_t x = '0;
  logic [MU_W-1:0] mu = '0;
  sample_t y_u, y_c;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  farrow_quad_interp u_interp (.clk, .rst_n, .x, .mu, .y(y_u));
  comp_filter        u_comp   (.clk, .rst_n, .x(y_u), .y(y_c));

  int checks = 0;
  int failures = 0;

  int  sym   [NSYM];
  int  xs    [NS];
  int  yu_log[NS];
  int  yc_log[NS];
  real ru    [NS];   // real model, interpolator
  real rcm   [NS];   // real model, interpolator + compensation

  real xr    [NS];   // unquantised stimulus
  real fu    [NS];   // floating-point interpolator on xr
  real fc    [NS];   // floating-point interpolator + compensation on xr
  real err_a [NSYM]; // symbol-instant errors handed to the BER evaluation

  real pk_u [NMU], rms_u [NMU], pk_c [NMU], rms_c [NMU];
  real dg_u [NMU], dg_c [NMU], fdg_u [NMU], fdg_c [NMU];

  function automatic real rc(input real t);
    real d;
    d = 1.0 - (2.0 * BETA * t) ** 2;
    if (t > -1e-9 && t < 1e-9) return 1.0;
    if (d < 1e-9 && d > -1e-9)
      return (PI / 4.0) * $sin(PI / (2.0 * BETA)) / (PI / (2.0 * BETA));
    return $sin(PI * t) / (PI * t) * $cos(PI * BETA * t) / d;
  endfunction

  function automatic int rnd(input real v);
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  // decision of one rail, levels +-1, +-3 in units of A
  function automatic int decide(input int v);
    if (v >= 2 * AMP)  return 3;
    if (v >= 0)            return 1;
    if (v >= -2 * AMP) return -1;
    return -3;
  endfunction

  // complementary error function, Chebyshev fit (fractional error < 1.2e-7)
  function automatic real erfc_c(input real u);
    real z, t, r;
    z = (u < 0.0) ? -u : u;
    t = 1.0 / (1.0 + 0.5 * z);
    r = t * $exp(-z * z - 1.26551223 + t * (1.00002368 + t * (0.37409196 +
        t * (0.09678418 + t * (-0.18628806 + t * (0.27886807 + t * (-1.13520398 +
        t * (1.48851973 + t * (-0.82215223 + t * 0.17087277)))))))));
    return (u >= 0.0) ? r : 2.0 - r;
  endfunction

  function automatic real qfun(input real u);
    return 0.5 * erfc_c(u / $sqrt(2.0));
  endfunction

  // Bit error rate of one rail for Gaussian noise of deviation sigma (LSB)
  // added to the symbol-instant values A*a_j + err_a[j] (Gray code: one bit
  // per decision error). ideal = 1 ignores err_a.
  function automatic real ber(input real sigma, input bit ideal);
    real p = 0.0;
    int  n = 0;
    for (int j = SPAN; j < NSYM - SPAN; j++) begin
      real e;
      e = ideal ? 0.0 : err_a[j];
      if (sym[j] == 1 || sym[j] == -1)
        p += qfun((AMP - e) / sigma) + qfun((AMP + e) / sigma);
      else
        p += qfun((AMP + e * sym[j] / 3) / sigma);
      n++;
    end
    return p / n / 2.0;
  endfunction

  // noise deviation at which the bit error rate reaches PE_TARGET
  function automatic real sigma_at(input bit ideal);
    real lo = 0.01 * AMP, hi = 2.0 * AMP, mid;
    for (int it = 0; it < 50; it++) begin
      mid = $sqrt(lo * hi);
      if (ber(mid, ideal) > PE_TARGET) hi = mid; else lo = mid;
    end
    return $sqrt(lo * hi);
  endfunction

  // Eb/N0 degradation in dB of the errors in err_a against ideal sampling
  function automatic real degradation_db();
    return 20.0 * $log10(sigma_at(1'b1) / sigma_at(1'b0));
  endfunction

  // error statistics of log[] against the symbols for sample offset d:
  // symbol j is at index K*j + d
  function automatic real rms_err(input int lg[NS], input int d);
    real s = 0.0;
    int  n = 0;
    for (int j = SPAN; j < NSYM - SPAN; j++) begin
      real e = real'(lg[K*j + d] - AMP * sym[j]);
      s += e * e;
      n++;
    end
    return $sqrt(s / n);
  endfunction

  int d_u, d_c;

  initial begin : main
    real mu_r, best, r, tm;
    for (int j = 0; j < NSYM; j++) sym[j] = 2 * int'($urandom_range(3, 0)) - 3;

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;

    for (int im = 0; im < NMU; im++) begin
      // fractional delay on the 10-bit grid
      mu_r = real'(rnd(real'(im) / NMU * (1 << MU_W))) / (1 << MU_W);

      // stimulus
      for (int n = 0; n < NS; n++) begin
        automatic real acc = 0.0;
        automatic int  jc  = n / K;
        for (int j = jc - SPAN; j <= jc + SPAN; j++) begin
          if (j < 0 || j >= NSYM) continue;
          acc += sym[j] * rc((n + mu_r) / K - j);
        end
        xr[n] = acc * AMP;
        xs[n] = rnd(acc * AMP);
        if (xs[n] > 511 || xs[n] < -512) begin
          failures++;
          $display("FAIL stimulus out of range n=%0d x=%0d", n, xs[n]);
        end
      end

      // real-valued model: y(n) ~ x at (n - 1 - mu), then the compensation FIR
      for (int n = 0; n < NS; n++) begin
        real s0, s1, s2;
        s0 = xs[n];
        s1 = (n >= 1) ? xs[n-1] : 0.0;
        s2 = (n >= 2) ? xs[n-2] : 0.0;
        ru[n] = s1 + mu_r * (0.5 * (s2 - s0) + mu_r * (0.5 * (s0 + s2) - s1));
        s0 = xr[n];
        s1 = (n >= 1) ? xr[n-1] : 0.0;
        s2 = (n >= 2) ? xr[n-2] : 0.0;
        fu[n] = s1 + mu_r * (0.5 * (s2 - s0) + mu_r * (0.5 * (s0 + s2) - s1));
      end
      for (int n = 0; n < NS; n++) begin
        automatic real acc = 0.0;
        for (int t = 0; t < COMP_TAPS; t++)
          if (n - t >= 0) acc += real'(COMP_COEF[t]) / (1 << COMP_CF) * ru[n-t];
        rcm[n] = acc;
        acc = 0.0;
        for (int t = 0; t < COMP_TAPS; t++)
          if (n - t >= 0) acc += real'(COMP_COEF[t]) / (1 << COMP_CF) * fu[n-t];
        fc[n] = acc;
      end

      // run the RTL: drive x[n] for the edge of cycle n, log outputs after it
      mu <= MU_W'(rnd(mu_r * (1 << MU_W)));
      // interpolator: 1 cycle, compensation filter: 2 more cycles
      for (int n = 0; n < NS + 4; n++) begin
        x <= (n < NS) ? sample_t'(xs[n]) : '0;
        @(posedge clk);
        #1;
        if (n < NS)                 yu_log[n]   = int'(y_u);
        if (n >= 2 && n - 2 < NS)   yc_log[n-2] = int'(y_c);
      end
      // flush the filters with zeros between delays
      x <= '0;
      repeat (8) @(posedge clk);

      // both outputs against the real model (skip the start-up samples)
      for (int n = 8; n < NS; n++) begin
        checks += 2;
        r = ru[n] - real'(yu_log[n]);
        if (r > TOL || r < -TOL) begin
          failures++;
          if (failures < 10)
            $display("FAIL mu=%0.3f n=%0d interpolator rtl=%0d model=%0.2f", mu_r, n, yu_log[n], ru[n]);
        end
        r = rcm[n] - real'(yc_log[n]);
        if (r > TOL || r < -TOL) begin
          failures++;
          if (failures < 10)
            $display("FAIL mu=%0.3f n=%0d compensated rtl=%0d model=%0.2f", mu_r, n, yc_log[n], rcm[n]);
        end
      end

      // symbol alignment: best offset for each chain
      best = 1e9; d_u = 0;
      for (int d = 0; d < 2 * K + 3; d++) begin
        r = rms_err(yu_log, d);
        if (r < best) begin best = r; d_u = d; end
      end
      best = 1e9; d_c = 0;
      for (int d = 0; d < 2 * K + 3; d++) begin
        r = rms_err(yc_log, d);
        if (r < best) begin best = r; d_c = d; end
      end
      // the parabola lands on the symbol one sample behind the newest input
      // (y ~ x at n - 1 - mu); the compensation filter adds its main-tap delay
      checks++;
      if (d_u != 1 || d_c != 1 + COMP_MAIN) begin
        failures++;
        $display("FAIL mu=%0.3f alignment uncomp=%0d comp=%0d", mu_r, d_u, d_c);
      end

      pk_u[im] = 0.0; pk_c[im] = 0.0;
      for (int j = SPAN; j < NSYM - SPAN; j++) begin
        int eu, ec;
        eu = yu_log[K*j + d_u] - AMP * sym[j];
        ec = yc_log[K*j + d_c] - AMP * sym[j];
        if ( eu > pk_u[im]) pk_u[im] =  eu;
        if (-eu > pk_u[im]) pk_u[im] = -eu;
        if ( ec > pk_c[im]) pk_c[im] =  ec;
        if (-ec > pk_c[im]) pk_c[im] = -ec;
        checks += 2;
        if (decide(yu_log[K*j + d_u]) != sym[j]) failures++;
        if (decide(yc_log[K*j + d_c]) != sym[j]) failures++;
      end
      rms_u[im] = rms_err(yu_log, d_u);
      rms_c[im] = rms_err(yc_log, d_c);
      tm = 100.0 / AMP;
      $display("mu=%0.3f  ISI peak/rms in %% of A: interpolator %5.2f / %5.2f   with compensation %5.2f / %5.2f",
               mu_r, pk_u[im] * tm, rms_u[im] * tm, pk_c[im] * tm, rms_c[im] * tm);

      // Eb/N0 degradation at the target error rate: RTL outputs and the
      // floating-point model of the same filters on the unquantised signal
      for (int j = 0; j < NSYM; j++) err_a[j] = real'(yu_log[K*j + 1] - AMP * sym[j]);
      dg_u[im] = degradation_db();
      for (int j = 0; j < NSYM; j++) err_a[j] = real'(yc_log[K*j + 1 + COMP_MAIN] - AMP * sym[j]);
      dg_c[im] = degradation_db();
      for (int j = 0; j < NSYM; j++) err_a[j] = fu[K*j + 1] - AMP * sym[j];
      fdg_u[im] = degradation_db();
      for (int j = 0; j < NSYM; j++) err_a[j] = fc[K*j + 1 + COMP_MAIN] - AMP * sym[j];
      fdg_c[im] = degradation_db();
      $display("           Eb/N0 loss at Pe=1e-6 (dB): interpolator %5.3f (float %5.3f)   with compensation %5.3f (float %5.3f)",
               dg_u[im], fdg_u[im], dg_c[im], fdg_c[im]);
    end

    begin
      automatic real wpu = 0.0, wpc = 0.0, wru = 0.0, wrc = 0.0;
      for (int im = 0; im < NMU; im++) begin
        if (pk_u[im]  > wpu) wpu = pk_u[im];
        if (pk_c[im]  > wpc) wpc = pk_c[im];
        if (rms_u[im] > wru) wru = rms_u[im];
        if (rms_c[im] > wrc) wrc = rms_c[im];
      end
      $display("worst over mu: peak %0.2f -> %0.2f LSB, rms %0.2f -> %0.2f LSB (without -> with compensation)",
               wpu, wpc, wru, wrc);
      checks += 2;
      if (!(wpc < wpu)) begin failures++; $display("FAIL compensation does not lower the worst peak ISI"); end
      if (!(wrc < wru)) begin failures++; $display("FAIL compensation does not lower the worst rms ISI"); end
    end

    begin
      automatic real wu = 0.0, wc = 0.0, fwu = 0.0, fwc = 0.0;
      for (int im = 0; im < NMU; im++) begin
        if (dg_u[im]  > wu)  wu  = dg_u[im];
        if (dg_c[im]  > wc)  wc  = dg_c[im];
        if (fdg_u[im] > fwu) fwu = fdg_u[im];
        if (fdg_c[im] > fwc) fwc = fdg_c[im];
        // the 10-bit datapath may add only a little to the loss of the ideal filters
        checks++;
        if (dg_u[im] - fdg_u[im] > DG_TOL || dg_c[im] - fdg_c[im] > DG_TOL) begin
          failures++;
          $display("FAIL mu index %0d: fixed-point loss exceeds floating point by more than %0.3f dB", im, DG_TOL);
        end
      end
      $display("worst-case Eb/N0 loss at Pe=1e-6: %0.3f dB -> %0.3f dB (floating point %0.3f -> %0.3f) without -> with compensation",
               wu, wc, fwu, fwc);
      checks += 2;
      if (!(wc < wu))   begin failures++; $display("FAIL compensation does not lower the worst-case loss"); end
      if (!(fwc < fwu)) begin failures++; $display("FAIL compensation does not lower the worst-case loss (floating point)"); end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (NMU * (NS + 20) + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
