// timing_error_detector: early-late timing error detector.
//
// For each decimated symbol it forms
//   e = I(sym) * (I(late) - I(early)) + Q(sym) * (Q(late) - Q(early))
// where early and late are the interpolated samples one Fs period before and
// after the strobe. At the top of the pulse early and late are equal on average
// and e averages to zero; e > 0 means the strobe is early (the pulse is still
// rising) and e < 0 that it is late. The source design names a timing error
// detector fed by the Fs-rate and the symbol-rate streams but does not give its
// algorithm; the early-late form is this design's choice.
//
// A symbol whose neighbours are not usable (ted_en low, after the strobe
// spacing was shortened) yields e = 0 so that it does not disturb the loop.
//
// Interface: e is registered and valid (e_valid) one cycle after in_valid.
module timing_error_detector
  import stadj_pkg::*;
#(
  parameter int EW = 2 * W + 3
)(
  input  logic                 clk,
  input  logic                 rst_n,
  input  iq_t                  sym,
  input  iq_t                  early,
  input  iq_t                  late,
  input  logic                 in_valid,
  input  logic                 ted_en,     // low: neighbours unusable, output 0
  output logic signed [EW-1:0] e,
  output logic                 e_valid
);

  logic signed [W:0]    di, dq;
  logic signed [EW-1:0] ei, eq;

  always_comb begin
    di = (W+1)'(late.i) - (W+1)'(early.i);
    dq = (W+1)'(late.q) - (W+1)'(early.q);
    ei = EW'(sym.i) * EW'(di);
    eq = EW'(sym.q) * EW'(dq);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      e       <= '0;
      e_valid <= 1'b0;
    end else begin
      e_valid <= in_valid;
      if (in_valid) e <= ted_en ? ei + eq : '0;
    end
  end

endmodule
