// tb_stadj_rx_top: end-to-end test of the symbol timing adjustment receiver at its
// default parameters.
//
// A real-valued transmitter model generates random QAM-16 symbols, shapes them
// with a square-root raised-cosine pulse (rolloff 0.2, span +-4 symbols) and
// places them on an IF carrier at Fs/4 (0.75 * Fsym for K = 3). The transmitter's
// symbol period is K * (1 + DELTA) receiver samples, i.e. its clock is offset from
// the receiver's fixed sampling clock, and it starts with a timing offset of
// TAU0 samples. Two runs are made, one with a slow and one with a fast
// transmitter clock, so the loop has to lengthen (K+1) and shorten (K-1) the
// strobe spacing. After a settling time every decision must equal the sent
// symbol (at one constant symbol delay found by search), the symbol rate must
// equal the transmitter's, and the mechanisms must each have occurred:
// slips in both directions, every basepoint index m, mu in every quarter of [0,1).
module tb_stadj_rx_top;
  import stadj_pkg::*;

  localparam int    NSYM    = 4000;   // symbols per run
  localparam int    SETTLE  = 1500;   // symbols ignored while the loop acquires
  localparam int    MAXD    = 40;     // largest symbol delay searched
  localparam real   PI      = 3.14159265358979;
  localparam real   BETA    = 0.2;

  logic clk = 0, rst_n = 0;
  sample_t adc_in;
  logic [1:0] bits_i, bits_q;
  logic out_valid, sym_valid, slip_early, slip_late;
  iq_t sym_soft;
  logic [MU_W-1:0] mu;
  logic [$clog2(K)-1:0] m;

  stadj_rx_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_slip_early = 0, n_slip_late = 0;
  int m_seen [K];
  int mu_q_seen [4];

  // transmitted symbols: level index 0..3 for -3,-1,+1,+3
  int  tx_i [NSYM + 64];
  int  tx_q [NSYM + 64];
  int  rx_i [$], rx_q [$];
  longint rx_cyc [$];
  longint cyc = 0;
  int n_ted_skip = 0;
  real hnorm;

  function automatic real srrc(input real t);   // t in symbol periods
    real num, den;
    if (t > -1e-9 && t < 1e-9) return 1.0 - BETA + 4.0 * BETA / PI;
    if ((4.0 * BETA * t - 1.0) ** 2 < 1e-12 || (4.0 * BETA * t + 1.0) ** 2 < 1e-12)
      return BETA / $sqrt(2.0) * ((1.0 + 2.0 / PI) * $sin(PI / (4.0 * BETA)) +
                                  (1.0 - 2.0 / PI) * $cos(PI / (4.0 * BETA)));
    num = $sin(PI * t * (1.0 - BETA)) + 4.0 * BETA * t * $cos(PI * t * (1.0 + BETA));
    den = PI * t * (1.0 - (4.0 * BETA * t) ** 2);
    return num / den;
  endfunction

  function automatic logic [1:0] gray(input int lvl);
    case (lvl)
      0: return 2'b00;
      1: return 2'b01;
      2: return 2'b11;
      default: return 2'b10;
    endcase
  endfunction

  function automatic int level_of(input logic [1:0] g);
    case (g)
      2'b00: return 0;
      2'b01: return 1;
      2'b11: return 2;
      default: return 3;
    endcase
  endfunction

  // received sample n of the run
  function automatic int rx_sample(input int n, input real delta, input real tau0);
    real tsym, t, ii, qq, h, x;
    int  k0;
    tsym = K * (1.0 + delta);
    ii = 0.0; qq = 0.0;
    k0 = int'($floor((n - tau0) / tsym));
    for (int k = k0 - 5; k <= k0 + 5; k++) begin
      if (k < 0 || k >= NSYM + 64) continue;
      t = (n - tau0 - k * tsym) / K;          // in symbol periods
      if (t < -4.0 || t > 4.0) continue;
      h = srrc(t) / hnorm;
      ii += h * (2 * tx_i[k] - 3) * LEVEL_A;
      qq += h * (2 * tx_q[k] - 3) * LEVEL_A;
    end
    x = ii * $cos(PI * n / 2.0) - qq * $sin(PI * n / 2.0);
    if (x > 511.0) x = 511.0;
    if (x < -512.0) x = -512.0;
    return int'($floor(x + 0.5));
  endfunction

  always @(posedge clk) cyc++;

  always @(posedge clk) if (rst_n) begin
    if (dut.ted_skip) n_ted_skip++;
    if (slip_early) n_slip_early++;
    if (slip_late)  n_slip_late++;
    if (sym_valid) m_seen[m]++;
    mu_q_seen[mu[MU_W-1 -: 2]]++;
    if (out_valid) begin
      rx_i.push_back(level_of(bits_i));
      rx_q.push_back(level_of(bits_q));
      rx_cyc.push_back(cyc);
    end
  end

  task automatic run(input real delta, input real tau0, input string name);
    int ncyc, best_d, best_err, err, nsym_rx, first, last;
    int ncyc_total;
    real exp_sym;
    rx_i.delete(); rx_q.delete(); rx_cyc.delete();
    for (int k = 0; k < NSYM + 64; k++) begin
      tx_i[k] = $urandom_range(0, 3);
      tx_q[k] = $urandom_range(0, 3);
    end
    rst_n = 0;
    adc_in = '0;
    repeat (4) @(posedge clk);
    rst_n <= 1;
    ncyc_total = int'(NSYM * K * (1.0 + delta));
    for (int n = 0; n < ncyc_total; n++) begin
      adc_in <= sample_t'(rx_sample(n, delta, tau0));
      @(posedge clk);
    end
    repeat (20) @(posedge clk);
    // delay search on the settled part
    best_d = -1; best_err = 1 << 30;
    for (int d = 0; d <= MAXD; d++) begin
      err = 0;
      for (int j = SETTLE; j < SETTLE + 200 && j < rx_i.size(); j++)
        if (j - d >= 0 && (rx_i[j] != tx_i[j - d] || rx_q[j] != tx_q[j - d])) err++;
      if (err < best_err) begin best_err = err; best_d = d; end
    end
    // every decision after settling must match
    err = 0;
    last = rx_i.size() - 1;
    for (int j = SETTLE; j <= last; j++) begin
      if (j - best_d >= NSYM) break;
      checks++;
      if (rx_i[j] != tx_i[j - best_d] || rx_q[j] != tx_q[j - best_d]) begin
        err++; failures++;
      end
    end
    // symbol rate: after settling, the spacing of the decisions must follow the
    // transmitter's symbol period K * (1 + delta), not the nominal K
    nsym_rx = rx_i.size();
    exp_sym = (last - SETTLE) * K * (1.0 + delta);
    checks++;
    if ((rx_cyc[last] - rx_cyc[SETTLE]) < exp_sym - 3.0 ||
        (rx_cyc[last] - rx_cyc[SETTLE]) > exp_sym + 3.0) begin
      failures++;
      $display("%s: %0d cycles for %0d symbols, %0.1f expected", name,
               rx_cyc[last] - rx_cyc[SETTLE], last - SETTLE, exp_sym);
    end
    $display("%s: delta=%0.4f delay=%0d symbols decided=%0d errors after settling=%0d (of %0d)",
             name, delta, best_d, nsym_rx, err, last - SETTLE + 1);
  endtask

  initial begin
    int tmp;
    hnorm = 0.0;
    for (int n = -4 * K; n <= 4 * K; n++) hnorm += srrc(real'(n) / K) ** 2;
    hnorm = $sqrt(hnorm);
    foreach (m_seen[i]) m_seen[i] = 0;
    foreach (mu_q_seen[i]) mu_q_seen[i] = 0;

    run( 1.0e-3, 1.4, "slow transmitter");
    tmp = n_slip_late;
    checks++;
    if (n_slip_late == 0) begin failures++; $display("no K+1 slip in slow run"); end
    run(-1.0e-3, 0.3, "fast transmitter");
    checks++;
    if (n_slip_early == 0) begin failures++; $display("no K-1 slip in fast run"); end

    $display("mechanisms: slips K-1=%0d K+1=%0d (slow run %0d), detector skips=%0d",
             n_slip_early, n_slip_late, tmp, n_ted_skip);
    checks++;
    if (n_ted_skip == 0) failures++;
    for (int i = 0; i < K; i++) begin
      $display("  basepoint m=%0d used %0d times", i, m_seen[i]);
      checks++;
      if (m_seen[i] == 0) failures++;
    end
    for (int i = 0; i < 4; i++) begin
      $display("  mu in quarter %0d for %0d cycles", i, mu_q_seen[i]);
      checks++;
      if (mu_q_seen[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10 * NSYM) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
