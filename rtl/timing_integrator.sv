// timing_integrator: integrator of the timing loop; splits the timing control
// into the basepoint index m and the fractional delay mu.
//
// The loop filter output v (in units of 1/2^MU_W sample) is subtracted from a
// phase register p that holds mu plus an integer carry. Once per symbol, in the
// cycle after a strobe, the fractional part of p becomes the new mu of the
// interpolators and the integer part (carry -1, 0 or +1) moves the next strobe:
//   carry  0 : next strobe K samples after the last one
//   carry +1 : mu passed 1, the next strobe comes one sample early (K-1)
//   carry -1 : mu fell below 0, the next strobe comes one sample late (K+1)
// so mu always stays in the central interval [0, 1) of the interpolator.
// Changing mu and the strobe spacing only just after a strobe keeps each strobe
// consistent with the mu its sample was interpolated with.
//
// After a K-1 step the sample just before the next strobe was still
// interpolated with the old mu, so it lies two sample periods, not one, before
// the strobe. That strobe is marked with ted_skip so the timing error detector
// ignores it; otherwise each such step would kick mu back across the boundary.
//
// The integral part is delivered as a strobe flag aligned with the sample that
// enters the interpolators in the same cycle; the flag then travels down the
// pipeline with that sample to the variable decimator. m reports the strobe's
// position (basepoint index) within the free-running K-sample frame.
// The source design names the integrator and its outputs m and mu; the phase
// register, the strobe flag and the update timing are this design's own.
//
// Interface: v is taken when v_valid is high (|v| < 2^(MU_W-1), asserted).
// mu, strobe and m are registered.
module timing_integrator
  import stadj_pkg::*;
#(
  parameter int KOS = K          // oversampling ratio Fs / Fsym
)(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic signed [MU_W:0]      v,
  input  logic                      v_valid,
  output logic [MU_W-1:0]           mu,
  output logic                      strobe,     // the sample entering now is a symbol basepoint
  output logic                      ted_skip,   // with strobe: its early neighbour is not usable
  output logic [$clog2(KOS)-1:0]    m,          // basepoint index of the last strobe
  output logic                      slip_early, // pulse: strobe interval shortened to K-1
  output logic                      slip_late   // pulse: strobe interval lengthened to K+1
);

  localparam int CW = $clog2(KOS + 2);
  typedef logic signed [MU_W+2:0] phase_t;

  phase_t              p;
  logic [CW-1:0]       cnt;
  logic [$clog2(KOS)-1:0] ph;
  logic                strobe_d;
  logic                short_pend;   // a K-1 slip was applied, its strobe is pending
  phase_t              pbase, frac;
  logic signed [1:0]   carry;
  logic                apply;

  assign strobe   = (cnt == '0);
  assign ted_skip = strobe && short_pend;
  assign apply  = strobe_d;
  assign carry  = 2'(p >>> MU_W);
  assign frac   = phase_t'({1'b0, p[MU_W-1:0]});

  always_comb begin
    pbase = apply ? frac : p;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      p          <= '0;
      mu         <= '0;
      cnt        <= CW'(KOS - 1);
      ph         <= '0;
      m          <= '0;
      strobe_d   <= 1'b0;
      short_pend <= 1'b0;
      slip_early <= 1'b0;
      slip_late  <= 1'b0;
    end else begin
      strobe_d   <= strobe;
      ph         <= (ph == $clog2(KOS)'(KOS - 1)) ? '0 : ph + 1'b1;
      slip_early <= 1'b0;
      slip_late  <= 1'b0;
      if (strobe) m <= ph;
      p <= v_valid ? pbase - phase_t'(v) : pbase;
      if (apply) mu <= p[MU_W-1:0];
      if (strobe) short_pend <= 1'b0;
      if (strobe)
        cnt <= CW'(KOS - 1);
      else if (apply) begin
        cnt        <= CW'(int'(cnt) - 1 - int'(carry));
        slip_early <= (carry == 2'sd1);
        short_pend <= (carry == 2'sd1);
        slip_late  <= (carry == -2'sd1);
      end else
        cnt <= cnt - 1'b1;
    end
  end

  // the loop filter keeps each update below half a sample
  localparam logic signed [MU_W:0] VLIM = (MU_W+1)'(1 <<< (MU_W - 1));
  a_v_range: assert property (@(posedge clk) disable iff (!rst_n)
    v_valid |-> (v < VLIM && v > -VLIM))
    else $error("timing_integrator: update too large");
  a_carry: assert property (@(posedge clk) disable iff (!rst_n)
    apply |-> (carry != -2'sd2))
    else $error("timing_integrator: phase out of range");

endmodule
