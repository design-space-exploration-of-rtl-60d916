// tb_loop_filter: drives random detector errors, including long runs of one
// sign that push the output into saturation, and compares v with a reference
// model of v = round(e / 2^11) + round(sum(e) / 2^19) limited to +-511,
// valid one cycle after e_valid; the accumulator only moves on valid inputs.
module tb_loop_filter;
  import stadj_pkg::*;

  localparam int EW = 2 * W + 3;
  logic clk = 0, rst_n = 0;
  logic signed [EW-1:0] e;
  logic e_valid, v_valid;
  logic signed [MU_W:0] v;
  int checks = 0, failures = 0;

  loop_filter dut (.*);
  always #5 clk = ~clk;

  longint acc = 0;
  longint last_v = 0;

  function automatic longint rdiv(input longint a, input int sh);
    return (a + (longint'(1) <<< (sh - 1))) >>> sh;   // round half up
  endfunction

  initial begin
    longint ev, want;
    bit vld;
    e = '0; e_valid = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 3000; n++) begin
      if (n < 1000)      ev = $signed($urandom_range(0, 400000)) - 200000;
      else if (n < 1500) ev = $urandom_range(0, 300000);          // drift up, saturate
      else if (n < 2500) ev = -longint'($urandom_range(0, 300000)); // drift down
      else               ev = $signed($urandom_range(0, 2000)) - 1000;
      vld = ($urandom_range(0, 3) != 0);
      e <= EW'(ev);
      e_valid <= vld;
      @(posedge clk);
      #1;
      if (vld) begin
        acc += ev;
        want = rdiv(ev, 11) + rdiv(acc, 19);
        if (want > 511) want = 511;
        if (want < -511) want = -511;
        last_v = want;
      end
      checks++;
      if (v_valid != vld || (vld && longint'(v) != last_v)) begin
        failures++;
        if (failures < 10) $display("n=%0d got %0d want %0d", n, v, last_v);
      end
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
