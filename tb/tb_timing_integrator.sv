// tb_timing_integrator: feeds timing corrections v at random times and checks
// the strobes against the timing they imply. A strobe at cycle s with fractional
// delay mu samples the signal at s - mu/1024 samples; every correction v moves
// that point by +v/1024 samples. So for every strobe i, counted from a reference
// strobe 0,
//   1024 * (s_i - s_0 - i*K) - (mu_i - mu_0) = sum of the corrections applied
// exactly, where a correction counts once the phase register has absorbed it
// before the update that follows strobe i-1. Also checks the strobe spacing
// (K-1..K+1), that m is the strobe's index in the K-sample frame, the slip
// pulses and that ted_skip marks exactly the strobes after a shortened interval.
module tb_timing_integrator;
  import stadj_pkg::*;

  logic clk = 0, rst_n = 0;
  logic signed [MU_W:0] v;
  logic v_valid;
  logic [MU_W-1:0] mu;
  logic strobe, ted_skip, slip_early, slip_late;
  logic [$clog2(K)-1:0] m;
  int checks = 0, failures = 0;

  timing_integrator dut (.*);
  always #5 clk = ~clk;

  initial begin
    longint cyc, last_strobe, pend_sum, applied_sum;
    int n_early = 0, n_late = 0, n_skip = 0, nstrobe = 0, spacing;
    longint tgt_q;    // target position of the next strobe, in 1/1024 sample
    longint total;    // sum of all corrections applied so far
    bit seen_short, prev_strobe;
    longint cum_v, snap, snap0, s0, mu0;
    int vv_cap, idx;
    bit pend_m;
    logic [$clog2(K)-1:0] last_m;
    v = '0; v_valid = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    cyc = 0; last_strobe = -1; pend_sum = 0; total = 0; seen_short = 0;
    prev_strobe = 0; cum_v = 0; snap = 0; idx = -1; pend_m = 0; last_m = '0; spacing = 0;
    for (int n = 0; n < 6000; n++) begin
      // a correction roughly once per symbol, mostly small, sometimes large
      if ($urandom_range(0, 2) == 0) begin
        int vv;
        vv = (n < 3000) ? $signed($urandom_range(0, 300)) - 100    // net drift one way
                        : $signed($urandom_range(0, 300)) - 200;   // then the other
        if ($urandom_range(0, 9) == 0) vv = (vv > 0) ? 511 : -511;
        v <= (MU_W+1)'(vv);
        v_valid <= 1;
        vv_cap = vv;
      end else begin
        v_valid <= 0;
        vv_cap = 0;
      end
      prev_strobe = strobe;
      @(posedge clk);
      #1;
      cyc++;
      if (pend_m) begin
        // m now holds the index of the strobe one cycle ago
        checks++;
        if (idx > 0 && int'(m) != (int'(last_m) + spacing) % K) failures++;
        last_m = m;
        pend_m = 0;
      end
      cum_v += vv_cap;
      // the update edge follows the cycle after a strobe; it absorbs every
      // correction captured up to and including this edge
      if (prev_strobe) snap = cum_v;
      if (slip_early) begin n_early++; seen_short = 1; end
      if (slip_late) n_late++;
      if (strobe) begin
        nstrobe++;
        idx++;
        if (idx == 0) begin
          s0 = cyc; mu0 = mu; snap0 = snap;
        end else begin
          checks++;
          if (1024 * (cyc - s0 - longint'(idx) * K) - (longint'(mu) - mu0) != snap - snap0) begin
            failures++;
            if (failures < 10) $display("strobe %0d at %0d mu=%0d: timing off %0d vs %0d", idx, cyc, mu,
              1024 * (cyc - s0 - longint'(idx) * K) - (longint'(mu) - mu0), snap - snap0);
          end
        end
        pend_m = 1;
        checks += 2;
        // the strobe index ends in m within the free-running K frame
        if (ted_skip) n_skip++;
        if (ted_skip != seen_short) failures++;
        seen_short = 0;
        if (last_strobe >= 0) begin
          spacing = int'(cyc - last_strobe);
          if (spacing < K - 1 || spacing > K + 1) begin
            failures++;
            if (failures < 10) $display("spacing %0d at cycle %0d", spacing, cyc);
          end
        end
        last_strobe = cyc;
      end
    end
    // consistency of absolute timing: (strobe count * K - shift) must match the
    // applied corrections; checked through mu + integer steps over the whole run
    checks += 3;
    if (n_early == 0) failures++;
    if (n_late == 0) failures++;
    if (n_skip != n_early) failures++;
    $display("%0d strobes, %0d shortened, %0d lengthened, %0d skips", nstrobe, n_early, n_late, n_skip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
