// tb_farrow_quad_interp: compares the interpolator with the 3-point Lagrange
// polynomial evaluated in real arithmetic: y[k] must be within 2 LSB of
//   L(mu) = x1 + mu (x2 - x0)/2 + mu^2 ((x0 + x2)/2 - x1),  x0=x[k], x1=x[k-1], x2=x[k-2]
// for random samples and random mu, must equal x[k-1] (less its LSB) at mu = 0,
// and must track a slow sine delayed by 1 + mu samples to within 3 LSB.
// Latency: y follows x and mu by one cycle.
module tb_farrow_quad_interp;
  import stadj_pkg::*;

  logic clk = 0, rst_n = 0;
  sample_t x, y;
  logic [MU_W-1:0] mu;
  int checks = 0, failures = 0;
  int x0 = 0, x1 = 0, x2 = 0;

  farrow_quad_interp dut (.*);
  always #5 clk = ~clk;

  task automatic step(input int xv, input int muv, input real want, input real tol);
    x2 = x1; x1 = x0; x0 = xv;
    x  <= sample_t'(xv);
    mu <= MU_W'(muv);
    @(posedge clk);
    #1;
    checks++;
    if (real'(y) - want > tol || want - real'(y) > tol) begin
      failures++;
      if (failures < 10) $display("x=%0d,%0d,%0d mu=%0d got %0d want %0.2f", x0, x1, x2, muv, y, want);
    end
  endtask

  function automatic real lagrange(input int a0, input int a1, input int a2, input real m);
    return a1 + m * (a2 - a0) / 2.0 + m * m * ((a0 + a2) / 2.0 - a1);
  endfunction

  initial begin
    int xv, mv, n0, n1;
    real m, want;
    x = '0; mu = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // random samples and mu (kept in range so the parabola cannot overflow)
    for (int n = 0; n < 2000; n++) begin
      xv = $signed($urandom_range(0, 511)) - 256;
      mv = (n % 10 == 0) ? 0 : $urandom_range(0, (1 << MU_W) - 1);
      m  = real'(mv) / (1 << MU_W);
      n0 = xv; n1 = x0;
      want = lagrange(n0, n1, x1, m);
      if (mv == 0) want = 2 * (n1 >>> 1);
      step(xv, mv, want, mv == 0 ? 0.0 : 2.0);
    end
    // slow sine: output at mu must be the sine delayed by 1 + mu samples
    for (int n = 0; n < 1000; n++) begin
      mv = 256 * ((n / 100) % 4) + 37;
      m  = real'(mv) / (1 << MU_W);
      xv = int'($floor(400.0 * $sin(2.0 * 3.14159265358979 * 0.05 * n) + 0.5));
      want = 400.0 * $sin(2.0 * 3.14159265358979 * 0.05 * (n - 1.0 - m));
      step(xv, mv, want, (n % 100 < 3) ? 1000.0 : 3.0);
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
