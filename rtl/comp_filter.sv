// comp_filter: fixed compensation filter following the interpolator filter.
//
// The interpolation error of a low-order polynomial interpolator depends on mu.
// The source design removes most of it with a fixed FIR placed after the
// interpolator and designed so that interpolator plus compensation filter are
// all-pass at one chosen fractional delay (mu = 0.25 for the quadratic
// interpolator). This design realises it as a 5-tap FIR whose coefficients
// (stadj_pkg::COMP_COEF, units of 1/256, main tap 2) are a least-squares fit of
// that all-pass condition over the signal band; length, fit and coefficient
// width are this design's own choices.
//
// Structure: transposed direct form. Each clock the input is multiplied by every
// coefficient and added into a chain of partial-sum registers, so no adder chain
// longer than one adder sits between registers. The final sum is rounded, shifted
// by CF and saturated to 10 bits in an output register.
//
// Interface: one sample per clock; y in cycle n+2 is sum_j COEF[j] * x[n-j] for
// the input x[n] presented in cycle n (two cycles of latency, plus the main-tap
// delay of COMP_MAIN samples).
module comp_filter
  import stadj_pkg::*;
#(
  parameter int NT = COMP_TAPS,
  parameter int CW = COMP_CW,
  parameter int CF = COMP_CF,
  parameter logic signed [CW-1:0] COEF [NT] = COMP_COEF
)(
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t x,
  output sample_t y
);

  localparam int AW = W + CW + $clog2(NT) + 1;
  typedef logic signed [AW-1:0] acc_t;

  acc_t ps [NT];        // ps[j]: partial sum waiting for taps 0..j-1 of later samples
  acc_t sum;

  assign sum = ps[0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int j = 0; j < NT; j++) ps[j] <= '0;
      y <= '0;
    end else begin
      for (int j = 0; j < NT - 1; j++)
        ps[j] <= acc_t'(x) * acc_t'(COEF[j]) + ps[j+1];
      ps[NT-1] <= acc_t'(x) * acc_t'(COEF[NT-1]);
      y <= sat_w((longint'(sum) + (longint'(1) <<< (CF - 1))) >>> CF);
    end
  end

endmodule
