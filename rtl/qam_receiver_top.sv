// qam_receiver_top: digital part of a variable symbol rate QAM cable
// receiver (64-QAM, 875 kBd to 7 MBd).
//
// Signal flow, all in the ADC clock domain with clock enables:
//   adc_in -> agc (gain words back to the analog RF/IF stages)
//          -> prelim_demod (f_s/4 translation to complex baseband)
//          -> recirc_decimator (half-band, ratio 2/4/8 by dec_sel)
//          -> timing_recovery (interpolator, band-edge TED, lead-lag, NCO:
//             resamples to exactly two samples per symbol)
//          -> matched_filter
//          -> pairing of the two samples of each symbol
//          -> blind_dfe (FFE/FBE, CMA or DD-LMS, carrier loop, slicer)
//          -> sym_i/sym_q decisions for an external FEC decoder.
// mode_ctrl steps the equalizer and carrier loop through timing acquisition,
// CMA with four-corners carrier tracking, DD-LMS on the linear path p1 and
// finally decision feedback on path p2.
//
// The chain and the acquisition order follow the receiver's architecture.
// The tuner, the ADC and the FEC decoder are outside this module: the ADC
// samples are an input and the decisions are outputs. Pairing the first
// resampled sample of each symbol as the "even" FFE input is this design's
// choice; the fractionally spaced equalizer absorbs the sampling phase.
//
// Interface: one ADC sample per clock. dec_sel and fse should be held
// constant while running. tr_freq_word = round(2^40 * 2 f_T / (f_ADC / 2)).
// sym_valid pulses once per symbol with sym_i/sym_q (level indices 0..7 per
// rail) and x_soft; tr_lf_out and cr_lf_out expose the two loop filters.
module qam_receiver_top
  import qam_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [DW-1:0] adc_in,
  input  logic [1:0]           dec_sel,
  input  logic [39:0]          tr_freq_word,
  input  logic                 tr_enable,
  input  logic                 fse,
  output logic [11:0]          rf_gain,
  output logic [11:0]          if_gain,
  output logic                 rf_step,
  output logic                 sym_valid,
  output logic [2:0]           sym_i,
  output logic [2:0]           sym_q,
  output cplx_t                x_soft,
  output eq_mode_e             mode,
  output logic signed [23:0]   tr_lf_out,
  output logic signed [23:0]   cr_lf_out,
  output logic                 dec_out_valid,
  output logic                 rs_valid,
  output cplx_t                eq_err
);
  logic  bb_valid, dec_valid_i, mf_valid, pair_valid, pair_ph;
  cplx_t bb, dec_o, rs, mf, x_e_hold, x_e, x_o;
  logic  eq_upd_en, cr_en, cma, four_corners, p2;

  agc u_agc (
    .clk, .rst_n, .in_valid(1'b1), .adc_in, .rf_gain, .if_gain, .rf_step
  );

  prelim_demod u_demod (
    .clk, .rst_n, .in_valid(1'b1), .adc_in, .out_valid(bb_valid), .out(bb)
  );

  recirc_decimator u_dec (
    .clk, .rst_n, .sel(dec_sel), .in_valid(bb_valid), .in(bb),
    .out_valid(dec_valid_i), .out(dec_o)
  );

  timing_recovery u_tr (
    .clk, .rst_n, .loop_en(tr_enable), .w_nom(tr_freq_word),
    .in_valid(dec_valid_i), .in(dec_o), .out_valid(rs_valid), .out(rs),
    .lf_out(tr_lf_out)
  );

  matched_filter u_mf (
    .clk, .rst_n, .in_valid(rs_valid), .in(rs), .out_valid(mf_valid), .out(mf)
  );

  // two resampled samples make one symbol for the equalizer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pair_ph    <= 1'b0;
      pair_valid <= 1'b0;
      x_e_hold   <= '0;
      x_e        <= '0;
      x_o        <= '0;
    end else begin
      pair_valid <= 1'b0;
      if (mf_valid) begin
        pair_ph <= ~pair_ph;
        if (!pair_ph) x_e_hold <= mf;
        else begin
          x_e        <= x_e_hold;
          x_o        <= mf;
          pair_valid <= 1'b1;
        end
      end
    end
  end

  mode_ctrl u_mode (
    .clk, .rst_n, .sym_valid(pair_valid), .mode, .eq_upd_en, .cr_en, .cma,
    .four_corners, .p2
  );

  blind_dfe u_dfe (
    .clk, .rst_n, .fse, .eq_upd_en, .cr_en, .cma, .four_corners, .p2,
    .sym_valid(pair_valid), .x_e, .x_o, .dec_valid(sym_valid),
    .idx_re(sym_i), .idx_im(sym_q), .x_soft, .err(eq_err), .cr_lf_out
  );

  assign dec_out_valid = dec_valid_i;
endmodule
