// stadj_rx_top: QAM-16 receiver front end with all-digital symbol timing
// adjustment by interpolation at complex baseband.
//
// The A/D converter samples the low-IF signal with a fixed clock at Fs = K * Fsym
// (K = 3) that is not locked to the transmitter. The receiver brings the signal to
// baseband (quad_downconv), matched-filters each branch (srrc_filter), and then
// recovers the transmitter's symbol instants digitally: a quadratic Farrow
// interpolator per branch (farrow_quad_interp) shifts the stream by the fractional
// delay mu, a fixed compensation filter per branch (comp_filter) removes most of
// the interpolation error, and the variable decimator (var_decimator) keeps the
// one sample in K (the basepoint index m) that lies at the top of each symbol. A
// feedback loop of timing error detector, loop filter and integrator
// (timing_error_detector, loop_filter, timing_integrator) steers mu and m.
// Each decimated symbol is decided by a QAM-16 slicer (qam_slicer).
// The chain, its order and K = 3, quadratic interpolation, compensation and
// 10-bit filter wordlength follow the source design; the loop's detector,
// filter form, gains and the strobe-flag timing are this design's own.
//
// Timing: one input sample per clock (clk = Fs). The strobe flag produced by the
// integrator for the sample entering the interpolators is delayed by
// FLAG_DLY = 3 + COMP_MAIN cycles so it reaches the decimator together with the
// compensated sample whose main tap is that interpolated sample. Symbol decisions
// come out on bits_i/bits_q with out_valid, on average one every K clocks.
// Reset is synchronous, active low.
module stadj_rx_top
  import stadj_pkg::*;
#(
  parameter int KP_SH = 11,
  parameter int KI_SH = 19
)(
  input  logic             clk,
  input  logic             rst_n,
  input  sample_t          adc_in,     // A/D converter sample (low IF, Fs)
  output logic [1:0]       bits_i,     // Gray-coded I decision
  output logic [1:0]       bits_q,     // Gray-coded Q decision
  output logic             out_valid,
  output iq_t              sym_soft,   // decimated soft symbol
  output logic             sym_valid,
  output logic [MU_W-1:0]  mu,         // current fractional delay
  output logic [$clog2(K)-1:0] m,      // current basepoint index
  output logic             slip_early, // strobe spacing K-1 applied
  output logic             slip_late   // strobe spacing K+1 applied
);

  localparam int FLAG_DLY = 3 + COMP_MAIN;
  localparam int EW       = 2 * W + 3;

  sample_t i_bb, q_bb, i_mf, q_mf, i_ip, q_ip;
  iq_t     y_c, early, late;
  logic    strobe, ted_skip, ted_en;
  logic [FLAG_DLY-1:0] strobe_dl, skip_dl;
  logic signed [EW-1:0] e;
  logic    e_valid;
  logic signed [MU_W:0] v;
  logic    v_valid;

  quad_downconv u_dc (
    .clk, .rst_n, .x(adc_in), .i_bb, .q_bb
  );

  srrc_filter u_mf_i (.clk, .rst_n, .x(i_bb), .y(i_mf));
  srrc_filter u_mf_q (.clk, .rst_n, .x(q_bb), .y(q_mf));

  farrow_quad_interp u_ip_i (.clk, .rst_n, .x(i_mf), .mu, .y(i_ip));
  farrow_quad_interp u_ip_q (.clk, .rst_n, .x(q_mf), .mu, .y(q_ip));

  comp_filter u_cf_i (.clk, .rst_n, .x(i_ip), .y(y_c.i));
  comp_filter u_cf_q (.clk, .rst_n, .x(q_ip), .y(y_c.q));

  // strobe flag travels alongside the interpolator and compensation pipeline
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      strobe_dl <= '0;
      skip_dl   <= '0;
    end else begin
      strobe_dl <= {strobe_dl[FLAG_DLY-2:0], strobe};
      skip_dl   <= {skip_dl[FLAG_DLY-2:0], ted_skip};
    end
  end

  var_decimator u_dec (
    .clk, .rst_n, .y(y_c), .strobe(strobe_dl[FLAG_DLY-1]),
    .ted_skip(skip_dl[FLAG_DLY-1]),
    .sym(sym_soft), .early, .late, .sym_valid, .ted_en
  );

  timing_error_detector #(.EW(EW)) u_ted (
    .clk, .rst_n, .sym(sym_soft), .early, .late, .in_valid(sym_valid),
    .ted_en, .e, .e_valid
  );

  loop_filter #(.EW(EW), .KP_SH(KP_SH), .KI_SH(KI_SH)) u_lf (
    .clk, .rst_n, .e, .e_valid, .v, .v_valid
  );

  timing_integrator u_int (
    .clk, .rst_n, .v, .v_valid, .mu, .strobe, .ted_skip, .m, .slip_early, .slip_late
  );

  qam_slicer u_sl (
    .clk, .rst_n, .sym(sym_soft), .in_valid(sym_valid),
    .bits_i, .bits_q, .out_valid
  );

endmodule
