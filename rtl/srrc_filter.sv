// srrc_filter: square-root raised-cosine data (matched) filter for one branch.
//
// Direct-form FIR at Fs = 3 * Fsym with rolloff 0.2, as the source design uses
// for its data filtering. The 25 taps (span +-4 symbols) and their 10-bit values
// are this design's own choice and are defined in stadj_pkg. The impulse response
// is symmetric, so the delay line is folded: pairs of samples that share a
// coefficient are added first, giving 13 multiplications per output.
// The sum of products is rounded and shifted right by CF - GAIN_SHIFT and then
// saturated to 10 bits; GAIN_SHIFT = 1 doubles the output to undo the factor
// 1/2 of the Fs/4 mixer.
//
// Interface: one sample per clock. y in cycle n+1 is the filter output that
// includes the sample presented in cycle n; the group delay is 12 samples more.
module srrc_filter
  import stadj_pkg::*;
#(
  parameter int NT         = SRRC_TAPS,
  parameter int CW         = SRRC_CW,
  parameter int CF         = SRRC_CF,
  parameter int GAIN_SHIFT = 1,
  parameter logic signed [CW-1:0] COEF [NT] = SRRC_COEF
)(
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t x,
  output sample_t y
);

  localparam int SH = CF - GAIN_SHIFT;
  localparam int NH = (NT + 1) / 2;   // distinct coefficients

  sample_t dl [NT-1];                  // dl[0] is the newest stored sample
  longint  acc;

  // the newest sample enters combinationally so y follows x by one cycle
  always_comb begin
    sample_t tap [NT];
    tap[0] = x;
    for (int j = 1; j < NT; j++) tap[j] = dl[j-1];
    acc = 0;
    for (int j = 0; j < NH; j++) begin
      if (j == NT - 1 - j)
        acc += longint'(tap[j]) * longint'(COEF[j]);
      else
        acc += (longint'(tap[j]) + longint'(tap[NT-1-j])) * longint'(COEF[j]);
    end
  end

  // the folded datapath is only valid for a symmetric impulse response
  initial begin
    for (int j = 0; j < NT; j++)
      assert (COEF[j] == COEF[NT-1-j]) else $error("srrc_filter: COEF not symmetric");
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int j = 0; j < NT - 1; j++) dl[j] <= '0;
      y <= '0;
    end else begin
      dl[0] <= x;
      for (int j = 1; j < NT - 1; j++) dl[j] <= dl[j-1];
      y <= sat_w((acc + (longint'(1) <<< (SH - 1))) >>> SH);
    end
  end

endmodule
