// tb_qam_slicer: sweeps every 10-bit soft value on I and Q and compares the
// decision with the nearest QAM-16 level (-3A, -A, A, 3A, A = 92) in Gray code,
// and checks that out_valid follows in_valid by one cycle.
module tb_qam_slicer;
  import stadj_pkg::*;

  logic clk = 0, rst_n = 0;
  iq_t sym;
  logic in_valid;
  logic [1:0] bits_i, bits_q;
  logic out_valid;
  int checks = 0, failures = 0;

  qam_slicer dut (.*);
  always #5 clk = ~clk;

  function automatic logic [1:0] nearest(input int v);
    int best, bd, d;
    int lv [4] = '{-3 * LEVEL_A, -LEVEL_A, LEVEL_A, 3 * LEVEL_A};
    logic [1:0] code [4] = '{2'b00, 2'b01, 2'b11, 2'b10};
    best = 0; bd = 1 << 30;
    for (int k = 0; k < 4; k++) begin
      d = (v - lv[k]) < 0 ? lv[k] - v : v - lv[k];
      if (d < bd || (d == bd && k > best)) begin bd = d; best = k; end
    end
    return code[best];
  endfunction

  initial begin
    int vi, vq;
    sym = '0; in_valid = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = -512; n < 512; n++) begin
      vi = n;
      vq = -1 - n;
      sym <= '{i: sample_t'(vi), q: sample_t'(vq)};
      in_valid <= (n % 7 != 3);
      @(posedge clk);
      #1;
      checks++;
      if (out_valid != (n % 7 != 3)) failures++;
      if (n % 7 != 3) begin
        checks += 2;
        if (bits_i != nearest(vi)) failures++;
        if (bits_q != nearest(vq)) failures++;
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
