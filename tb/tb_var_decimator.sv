// tb_var_decimator: feeds a stream whose I part counts samples (and Q part is
// its negative), flags strobes at random spacings of 2, 3 or 4 samples, some
// with ted_skip, and checks that each flagged sample comes out two cycles later
// with its predecessor as early and its successor as late, that ted_en is the
// inverse of ted_skip, and that exactly one symbol leaves per strobe.
module tb_var_decimator;
  import stadj_pkg::*;

  logic clk = 0, rst_n = 0;
  iq_t y, sym, early, late;
  logic strobe, ted_skip, sym_valid, ted_en;
  int checks = 0, failures = 0;

  var_decimator dut (.*);
  always #5 clk = ~clk;

  int q_idx [$];
  bit q_skip [$];
  int nstrobe = 0, nsym = 0;

  function automatic iq_t samp(input int n);
    return '{i: sample_t'(n % 500), q: sample_t'(-(n % 500))};
  endfunction

  // output side
  always @(posedge clk) if (rst_n && sym_valid) begin
    int n;
    bit sk;
    nsym++;
    checks++;
    if (q_idx.size() == 0) failures++;
    else begin
      n  = q_idx.pop_front();
      sk = q_skip.pop_front();
      if (sym != samp(n) || early != samp(n - 1) || late != samp(n + 1) || ted_en != !sk) begin
        failures++;
        if (failures < 10) $display("strobe %0d: sym %0d early %0d late %0d en %0d", n, sym.i, early.i, late.i, ted_en);
      end
    end
  end

  initial begin
    int next;
    y = '0; strobe = 0; ted_skip = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    next = 5;
    for (int n = 1; n < 3000; n++) begin
      y <= samp(n);
      strobe <= (n == next);
      ted_skip <= (n == next) && ($urandom_range(0, 3) == 0);
      @(posedge clk);
      #1;
      if (strobe) begin
        q_idx.push_back(n);
        q_skip.push_back(ted_skip);
        nstrobe++;
        next = n + $urandom_range(2, 4);
      end
    end
    y <= samp(3000); strobe <= 0;
    repeat (4) @(posedge clk);
    checks++;
    if (nsym != nstrobe || q_idx.size() != 0) failures++;
    $display("%0d strobes, %0d symbols", nstrobe, nsym);
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
