// tb_srrc_filter: recomputes the square-root raised-cosine taps from their
// closed form (rolloff 0.2, 3 samples per symbol, +-4 symbols, unit energy,
// rounded to 1/512), then checks the filter output sample by sample against a
// convolution with those taps, for an impulse, a full-scale step that must
// saturate, and random input. Latency: output one cycle after the input.
module tb_srrc_filter;
  import stadj_pkg::*;

  localparam real PI = 3.14159265358979;
  localparam real BETA = 0.2;
  localparam int NT = 25;

  logic clk = 0, rst_n = 0;
  sample_t x, y;
  int checks = 0, failures = 0;
  int taps [NT];
  int hist [NT];

  srrc_filter dut (.*);
  always #5 clk = ~clk;

  function automatic real srrc(input real t);
    if (t > -1e-9 && t < 1e-9) return 1.0 - BETA + 4.0 * BETA / PI;
    if ((4.0 * BETA * t - 1.0) ** 2 < 1e-12 || (4.0 * BETA * t + 1.0) ** 2 < 1e-12)
      return BETA / $sqrt(2.0) * ((1.0 + 2.0 / PI) * $sin(PI / (4.0 * BETA)) +
                                  (1.0 - 2.0 / PI) * $cos(PI / (4.0 * BETA)));
    return ($sin(PI * t * (1.0 - BETA)) + 4.0 * BETA * t * $cos(PI * t * (1.0 + BETA))) /
           (PI * t * (1.0 - (4.0 * BETA * t) ** 2));
  endfunction

  function automatic int expected();
    longint acc = 0;
    for (int j = 0; j < NT; j++) acc += longint'(hist[j]) * taps[j];
    acc = (acc + 128) >>> 8;      // coefficient scale 1/512, gain 2
    return acc > 511 ? 511 : (acc < -512 ? -512 : int'(acc));
  endfunction

  task automatic step(input int v);
    for (int j = NT - 1; j > 0; j--) hist[j] = hist[j-1];
    hist[0] = v;
    x <= sample_t'(v);
    @(posedge clk);
    #1;
    checks++;
    if (int'(y) != expected()) begin
      failures++;
      if (failures < 10) $display("got %0d want %0d", y, expected());
    end
  endtask

  initial begin
    real h [NT];
    real e;
    e = 0.0;
    for (int j = 0; j < NT; j++) begin
      h[j] = srrc(real'(j - 12) / 3.0);
      e += h[j] * h[j];
    end
    for (int j = 0; j < NT; j++) begin
      taps[j] = int'($floor(512.0 * h[j] / $sqrt(e) + 0.5));
      hist[j] = 0;
    end
    x = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // impulse
    step(256);
    for (int n = 0; n < 30; n++) step(0);
    // step to full scale: must saturate positive and negative
    for (int n = 0; n < 30; n++) step(511);
    for (int n = 0; n < 30; n++) step(-512);
    // random input
    for (int n = 0; n < 600; n++) step($signed($urandom_range(0, 1023)) - 512);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
