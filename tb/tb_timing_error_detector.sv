// tb_timing_error_detector: random neighbour triples, including full-scale
// values; e must equal I(sym)(I(late)-I(early)) + Q(sym)(Q(late)-Q(early)) one
// cycle after in_valid, and 0 when ted_en is low. Also checks the sign on a
// sampled pulse: a strobe before the peak must give e > 0, after it e < 0.
module tb_timing_error_detector;
  import stadj_pkg::*;

  localparam int EW = 2 * W + 3;
  logic clk = 0, rst_n = 0;
  iq_t sym, early, late;
  logic in_valid, ted_en, e_valid;
  logic signed [EW-1:0] e;
  int checks = 0, failures = 0;

  timing_error_detector dut (.*);
  always #5 clk = ~clk;

  function automatic int rnd();
    int r = $urandom_range(0, 9);
    if (r == 0) return -512;
    if (r == 1) return 511;
    return $signed($urandom_range(0, 1023)) - 512;
  endfunction

  task automatic apply(input int si, sq, ei, eq, li, lq, input bit en, input longint want);
    sym   <= '{i: sample_t'(si), q: sample_t'(sq)};
    early <= '{i: sample_t'(ei), q: sample_t'(eq)};
    late  <= '{i: sample_t'(li), q: sample_t'(lq)};
    ted_en <= en;
    in_valid <= 1;
    @(posedge clk);
    #1;
    checks++;
    if (!e_valid || longint'(e) != want) begin
      failures++;
      if (failures < 10) $display("got %0d want %0d", e, want);
    end
  endtask

  function automatic real pulse(input real t);   // raised-cosine-like bump
    return (t > -3.0 && t < 3.0) ? 0.5 * (1.0 + $cos(3.14159265358979 * t / 3.0)) : 0.0;
  endfunction

  initial begin
    int si, sq, ei, eq, li, lq, amp;
    bit en;
    sym = '0; early = '0; late = '0; in_valid = 0; ted_en = 1;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 2000; n++) begin
      si = rnd(); sq = rnd(); ei = rnd(); eq = rnd(); li = rnd(); lq = rnd();
      en = ($urandom_range(0, 4) != 0);
      apply(si, sq, ei, eq, li, lq, en,
            en ? longint'(si) * (li - ei) + longint'(sq) * (lq - eq) : 0);
    end
    // sign on a pulse of either polarity sampled at offsets -0.5 / +0.5 sample
    for (int s = 0; s < 2; s++) begin
      amp = s ? -300 : 300;
      for (int side = 0; side < 2; side++) begin
        real off;
        off = side ? 0.5 : -0.5;
        si = int'(amp * pulse(off)); ei = int'(amp * pulse(off - 1.0)); li = int'(amp * pulse(off + 1.0));
        apply(si, 0, ei, 0, li, 0, 1, longint'(si) * (li - ei));
        checks++;
        if (side == 0 && !(e > 0)) failures++;
        if (side == 1 && !(e < 0)) failures++;
      end
    end
    in_valid <= 0;
    @(posedge clk);
    #1;
    checks++;
    if (e_valid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
