// var_decimator: variable 1-of-K decimator.
//
// The interpolated complex stream arrives at Fs together with a strobe flag that
// marks the basepoint sample of each symbol (see timing_integrator). Normally one
// sample in K is flagged; after a timing slip the spacing is K-1 or K+1, so the
// decimator passes exactly the samples the timing loop selects rather than a
// fixed phase. For each flagged sample it also delivers its two Fs-rate
// neighbours (one sample earlier and one later) for the timing error detector,
// which the source design feeds from both the Fs and the symbol-rate stream.
// The flag interface and the neighbour outputs are this design's own choices.
//
// Interface: one sample per clock with synchronous active-low reset. When the
// sample presented in cycle n is flagged, sym_valid is high in cycle n+2 with
// sym = that sample, early = the sample of cycle n-1 and late = that of cycle n+1.
// ted_en accompanies each symbol and is low when the strobe came with ted_skip.
module var_decimator
  import stadj_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  iq_t  y,          // interpolated, compensated stream at Fs
  input  logic strobe,     // y is a symbol basepoint sample
  input  logic ted_skip,   // with strobe: the sample before y is not its neighbour
  output iq_t  sym,        // decimated symbol-rate sample
  output iq_t  early,      // Fs-rate sample before sym
  output iq_t  late,       // Fs-rate sample after sym
  output logic sym_valid,
  output logic ted_en      // early/late are valid neighbours of sym
);

  iq_t  y_d1, y_d2;
  logic pend, skip_d;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y_d1      <= '0;
      y_d2      <= '0;
      pend      <= 1'b0;
      skip_d    <= 1'b0;
      ted_en    <= 1'b0;
      sym       <= '0;
      early     <= '0;
      late      <= '0;
      sym_valid <= 1'b0;
    end else begin
      y_d1      <= y;
      y_d2      <= y_d1;
      pend      <= strobe;
      skip_d    <= strobe && ted_skip;
      sym_valid <= pend;
      if (pend) begin
        ted_en <= !skip_d;
        sym   <= y_d1;
        early <= y_d2;
        late  <= y;
      end
    end
  end

  // a strobe is never followed by another one in the next sample (K >= 3)
  a_spacing: assert property (@(posedge clk) disable iff (!rst_n) strobe |=> !strobe)
    else $error("var_decimator: strobes too close");

endmodule
