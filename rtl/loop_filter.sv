// loop_filter: proportional-plus-integral filter of the symbol timing loop.
//
//   acc[k] = acc[k-1] + e[k]
//   v[k]   = e[k] / 2^KP_SH + acc[k] / 2^KI_SH     (each term rounded)
// v is the timing correction per symbol in units of 1/2^MU_W sample and is
// saturated to +-(2^(MU_W-1) - 1), below half a sample. The integral branch
// lets the loop follow a constant sampling-rate offset between transmitter and
// receiver with zero mean timing error. The source design names the loop filter
// only; the second-order form and the gains (shift amounts) are this design's.
// With the early-late detector and a QAM-16 signal at the receiver's nominal
// level (mean detector slope about 14000 per sample of timing error) the
// default shifts correct about 0.7 % of the timing error per symbol, with a
// damping factor near 0.5. In end-to-end simulation they track a 0.1 %
// sampling-rate offset without decision errors; at 0.2 % some runs slip cycles.
//
// Interface: e is taken when e_valid is high; v and v_valid follow one cycle later.
module loop_filter
  import stadj_pkg::*;
#(
  parameter int EW    = 2 * W + 3,
  parameter int KP_SH = 11,
  parameter int KI_SH = 19,
  parameter int AW    = 40
)(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [EW-1:0]  e,
  input  logic                  e_valid,
  output logic signed [MU_W:0]  v,
  output logic                  v_valid
);

  localparam longint VMAX = (longint'(1) <<< (MU_W - 1)) - 1;

  logic signed [AW-1:0] acc, acc_n;
  longint               vsum;

  always_comb begin
    acc_n = acc + AW'(e);
    vsum  = ((longint'(e) + (longint'(1) <<< (KP_SH - 1))) >>> KP_SH)
          + ((longint'(acc_n) + (longint'(1) <<< (KI_SH - 1))) >>> KI_SH);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc     <= '0;
      v       <= '0;
      v_valid <= 1'b0;
    end else begin
      v_valid <= e_valid;
      if (e_valid) begin
        acc <= acc_n;
        if (vsum > VMAX)       v <= (MU_W+1)'(VMAX);
        else if (vsum < -VMAX) v <= (MU_W+1)'(-VMAX);
        else                   v <= (MU_W+1)'(vsum);
      end
    end
  end

endmodule
