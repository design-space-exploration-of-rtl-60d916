// quad_downconv: quadrature oscillator and mixer pair that moves the low-IF input
// to complex baseband.
//
// The source design places the IF carrier at 0.75 * Fsym and samples at
// Fs = 3 * Fsym, so the carrier sits at exactly Fs/4. The oscillator is then a
// free-running 2-bit phase counter: cos(pi n/2) = 1, 0, -1, 0 and
// -sin(pi n/2) = 0, -1, 0, 1. Each mixer is therefore a sign select or a zero,
// and no multiplier or sine table is needed (this reduction is this design's own;
// the source only names a quadrature oscillator and two multipliers).
// For an input x[n] = I[n] cos(pi n/2) - Q[n] sin(pi n/2) the outputs carry I/2
// and Q/2 plus an image at Fs/2 that the following SRRC filters remove; the
// SRRC filters restore the factor 2.
//
// Interface: one sample per clock (clk = Fs). Outputs are registered: the
// result for the sample presented in cycle n appears in cycle n+1.
// Negating -512 saturates to +511. The oscillator phase is 0 for the first
// sample after reset.
module quad_downconv
  import stadj_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t x,      // real low-IF input sample
  output sample_t i_bb,   // in-phase mixer output
  output sample_t q_bb    // quadrature mixer output
);

  logic [1:0] ph;
  sample_t    x_neg;

  assign x_neg = sat_w(-longint'(x));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ph    <= 2'd0;
      i_bb  <= '0;
      q_bb  <= '0;
    end else begin
      ph    <= ph + 2'd1;
      unique case (ph)
        2'd0: begin i_bb <= x;     q_bb <= '0;    end
        2'd1: begin i_bb <= '0;    q_bb <= x_neg; end
        2'd2: begin i_bb <= x_neg; q_bb <= '0;    end
        2'd3: begin i_bb <= '0;    q_bb <= x;     end
      endcase
    end
  end

endmodule
