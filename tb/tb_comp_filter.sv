// tb_comp_filter: (1) checks the output against a convolution with the tap
// values 9, -20, 265, 7, -6 (in 1/256) for random input, with two cycles of
// latency; (2) checks the all-pass property the filter is designed for: a sine
// wave, interpolated at mu = 0.25 by an exact 3-point Lagrange model and then
// compensated, must equal the sine delayed by 1.25 + 2 samples to within 4 LSB
// for frequencies across the signal band (up to 0.2 Fs).
module tb_comp_filter;
  import stadj_pkg::*;

  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  sample_t x, y;
  int checks = 0, failures = 0;
  int c [5] = '{9, -20, 265, 7, -6};
  int hist [7];

  comp_filter dut (.*);
  always #5 clk = ~clk;

  function automatic int conv();
    longint acc = 0;
    // hist[0] is the sample sent in this cycle, the output lags by one more
    for (int j = 0; j < 5; j++) acc += longint'(hist[j + 1]) * c[j];
    acc = (acc + 128) >>> 8;
    return acc > 511 ? 511 : (acc < -512 ? -512 : int'(acc));
  endfunction

  task automatic push(input int v);
    for (int j = 6; j > 0; j--) hist[j] = hist[j-1];
    hist[0] = v;
    x <= sample_t'(v);
    @(posedge clk);
    #1;
  endtask

  initial begin
    real f, mu, d, want, s0, s1, s2, maxerr;
    int v;
    foreach (hist[j]) hist[j] = 0;
    x = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 800; n++) begin
      push($signed($urandom_range(0, 1023)) - 512);
      if (n >= 2) begin
        checks++;
        if (int'(y) != conv()) begin
          failures++;
          if (failures < 10) $display("conv: got %0d want %0d", y, conv());
        end
      end
    end
    mu = 0.25;
    for (int fi = 1; fi <= 8; fi++) begin
      f = 0.025 * fi;
      maxerr = 0.0;
      for (int n = 0; n < 200; n++) begin
        // exact Lagrange interpolation of 400 sin(2 pi f k) around k = n-1
        s0 = 400.0 * $sin(2.0 * PI * f * n);
        s1 = 400.0 * $sin(2.0 * PI * f * (n - 1));
        s2 = 400.0 * $sin(2.0 * PI * f * (n - 2));
        v = int'($floor(s1 + mu * (s2 - s0) / 2.0 + mu * mu * ((s0 + s2) / 2.0 - s1) + 0.5));
        push(v);
        // output now holds interpolated samples up to n-1 through the filter
        want = 400.0 * $sin(2.0 * PI * f * (n - 1 - 1.0 - mu - 2.0));
        if (n >= 20) begin
          d = real'(y) - want;
          if (d < 0) d = -d;
          if (d > maxerr) maxerr = d;
          checks++;
          if (d > 4.0) failures++;
        end
      end
      $display("f = %0.3f Fs: largest deviation from pure delay %0.2f LSB", f, maxerr);
    end
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
