// farrow_quad_interp: quadratic (3-point Lagrange) interpolator filter in Farrow form.
//
// Computes, for every input sample, the value of the parabola through the last
// three samples x[k], x[k-1], x[k-2] at fractional delay mu behind x[k-1]:
//     y[k] = c0 + mu * (c1 + mu * c2)          (Horner form, 2 multipliers)
//     c0 = x[k-1]
//     c1 = (x[k-2] - x[k]) / 2
//     c2 = (x[k] + x[k-2]) / 2 - x[k-1]
// so y = x[k-1] for mu = 0 and y -> x[k-2] for mu -> 1; mu always lies in the
// central interval of the three points. As in the source design's Farrow
// structure the input is first scaled by 0.5 (s = x/2, one arithmetic shift),
// the delay line (two registers) holds s, and the centre tap is scaled back by 2;
// coefficient computation takes 3 adders and the Horner evaluation 2 more.
// The source design gives mu as a fractional delay in [0, 1); the direction of mu
// (delay behind x[k-1]) follows its linear structure, and the wiring of the adders
// is derived from the Lagrange polynomial.
//
// Wordlengths: samples are 10 bits as in the source design; mu is an unsigned
// 10-bit fraction (own choice). The coefficient and Horner nodes keep 1 to 3 guard
// bits so they cannot overflow; each product is rounded back to the sample LSB and
// the result is saturated to 10 bits (own choices).
//
// Interface: one sample per clock; x and mu are taken in the same cycle and y
// appears one cycle later (registered output, no further pipelining).
module farrow_quad_interp
  import stadj_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  sample_t          x,
  input  logic [MU_W-1:0]  mu,
  output sample_t          y
);

  typedef logic signed [W+2:0] node_t;   // 3 guard bits

  sample_t s0, s1, s2;                     // x[k]/2, x[k-1]/2, x[k-2]/2
  node_t   c0, c1, c2, p1, t, p2;
  typedef logic signed [W+MU_W+4:0] prod_t;
  prod_t   prod1, prod2;

  localparam prod_t HALF = prod_t'(1) <<< (MU_W - 1);

  assign s0 = x >>> 1;

  always_comb begin
    c0    = node_t'(s1) <<< 1;
    c1    = node_t'(s2) - node_t'(s0);
    c2    = node_t'(s0) + node_t'(s2) - (node_t'(s1) <<< 1);
    prod1 = prod_t'(c2) * prod_t'({1'b0, mu});
    p1    = node_t'((prod1 + HALF) >>> MU_W);
    t     = p1 + c1;
    prod2 = prod_t'(t) * prod_t'({1'b0, mu});
    p2    = node_t'((prod2 + HALF) >>> MU_W);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1 <= '0;
      s2 <= '0;
      y  <= '0;
    end else begin
      s1 <= s0;
      s2 <= s1;
      y  <= sat_w(longint'(p2) + longint'(c0));
    end
  end

endmodule
