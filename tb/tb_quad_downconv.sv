// tb_quad_downconv: checks the Fs/4 quadrature mixer against the oscillator
// sequence cos(pi n/2), -sin(pi n/2) applied to random input samples, including
// the full-scale negative value, and checks the one-cycle latency.
module tb_quad_downconv;
  import stadj_pkg::*;

  logic clk = 0, rst_n = 0;
  sample_t x, i_bb, q_bb;
  int checks = 0, failures = 0;

  quad_downconv dut (.*);
  always #5 clk = ~clk;

  function automatic int clip(input int v);
    return v > 511 ? 511 : (v < -512 ? -512 : v);
  endfunction

  initial begin
    int xv, n, ei, eq;
    real c, s;
    x = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (n = 0; n < 400; n++) begin
      xv = (n % 50 == 7) ? -512 : $signed($urandom_range(0, 1023)) - 512;
      x <= sample_t'(xv);
      @(posedge clk);
      #1;
      // sample n, taken at this edge, is now at the outputs
      c = $cos(3.14159265358979 * n / 2.0);
      s = -$sin(3.14159265358979 * n / 2.0);
      ei = clip(int'($floor(xv * c + 0.5)));
      eq = clip(int'($floor(xv * s + 0.5)));
      checks += 2;
      if (int'(i_bb) != ei || int'(q_bb) != eq) begin
        failures++;
        if (failures < 10) $display("n=%0d x=%0d got %0d/%0d want %0d/%0d", n, xv, i_bb, q_bb, ei, eq);
      end
    end
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
