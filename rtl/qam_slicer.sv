// qam_slicer: QAM-16 decision unit.
//
// Each of the I and Q components of a decimated symbol is decided separately
// against the thresholds 0 and +-2*A, i.e. to the nearest of the levels
// -3A, -A, +A, +3A, and coded Gray: -3A -> 00, -A -> 01, +A -> 11, +3A -> 10.
// The source design names the decision unit (a slicer per branch) for a QAM-16
// constellation; the level A and the bit mapping are this design's own.
//
// Interface: bits and sym_out are registered, valid in the cycle after in_valid.
module qam_slicer
  import stadj_pkg::*;
#(
  parameter int A = LEVEL_A
)(
  input  logic       clk,
  input  logic       rst_n,
  input  iq_t        sym,
  input  logic       in_valid,
  output logic [1:0] bits_i,
  output logic [1:0] bits_q,
  output logic       out_valid
);

  function automatic logic [1:0] decide(input sample_t s);
    if (s >= sample_t'(2 * A))       return 2'b10;
    else if (s >= 0)                 return 2'b11;
    else if (s >= -sample_t'(2 * A)) return 2'b01;
    else                             return 2'b00;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bits_i    <= '0;
      bits_q    <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        bits_i <= decide(sym.i);
        bits_q <= decide(sym.q);
      end
    end
  end

endmodule
