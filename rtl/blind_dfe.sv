// blind_dfe: passband blind decision feedback equalizer with built-in
// carrier recovery.
//
// The equalizer works on the signal before carrier removal, so its
// adaptation does not depend on the carrier phase. Per symbol:
//   y    = FFE(x_e, x_o) - FBE(f)                 passband equalizer output
//   x    = y * e^{-j theta}                       de-rotation to baseband
//   dec  = slicer(x)                              64-QAM decision
//   dp   = dec * e^{+j theta}                     decision back in passband
//   e    = CMA error of y          (cma = 1)
//        = dp - y                  (cma = 0, DD-LMS)
//   f    = y  on path p1 (p2 = 0): linear, IIR-like feedback of the x_soft output
//        = dp on path p2 (p2 = 1): true decision feedback
// The carrier loop takes x and the decision and updates theta; in
// four-corners mode it tracks on the constellation corners only.
//
// The structure (FFE, FBE, coefficient update switched between CMA and
// LMS, de-rotator, slicer, re-rotator and the p1/p2 switch) follows the
// receiver's blind DFE. The pipeline below is this design's.
//
// Timing: sym_valid (x_e/x_o) shifts both filters at cycle 0; their sums
// are registered at cycle 2, where the de-rotation, decision and error are
// formed combinationally and registered; cycle 3 applies the coefficient
// updates and the carrier phase detector, and presents the decision on
// dec_valid. The next sym_valid must come four or more cycles after the
// previous one.
module blind_dfe
  import qam_pkg::*;
#(
  parameter int TAPS_FF = 24,
  parameter int TAPS_FB = 24,
  parameter int N_MOD   = 3,
  parameter int MU_FF   = 8,
  parameter int MU_FB   = 8,
  parameter int INIT_TAP = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         fse,          // 1: T/2 fractionally spaced FFE
  input  logic         eq_upd_en,
  input  logic         cr_en,
  input  logic         cma,
  input  logic         four_corners,
  input  logic         p2,
  input  logic         sym_valid,
  input  cplx_t        x_e,
  input  cplx_t        x_o,
  output logic         dec_valid,
  output logic [2:0]   idx_re,
  output logic [2:0]   idx_im,
  output cplx_t        x_soft,         // de-rotated equalizer output (soft decision)
  output cplx_t        err,          // update error
  output logic signed [23:0] cr_lf_out
);
  logic  ff_valid, fb_valid;
  cplx_t y_ff, z_fb, y, x, dec, dp, e, fb_in;
  logic [2:0]        ir, ii;
  logic signed [4:0] lr, li;
  cplx_t             rot_neg, rot_pos;
  logic [23:0]       theta;
  logic              pd_valid;
  logic signed [15:0] pd;
  // registered at cycle 2 -> 3
  cplx_t             x_r;
  logic signed [4:0] lr_r, li_r;

  ffe_dual_mode #(.TAPS(TAPS_FF), .N_MOD(N_MOD), .MU_SH(MU_FF), .INIT_TAP(INIT_TAP)) u_ffe (
    .clk, .rst_n, .fse, .in_valid(sym_valid), .x_e, .x_o,
    .upd_en(eq_upd_en), .err_valid(dec_valid), .err,
    .out_valid(ff_valid), .y(y_ff)
  );

  fbe #(.TAPS(TAPS_FB), .MU_SH(MU_FB)) u_fbe (
    .clk, .rst_n, .in_valid(sym_valid), .d(fb_in),
    .upd_en(eq_upd_en), .err_valid(dec_valid), .err,
    .out_valid(fb_valid), .z(z_fb)
  );

  always_comb begin
    y.re = sat_dw(48'(y_ff.re) - 48'(z_fb.re));
    y.im = sat_dw(48'(y_ff.im) - 48'(z_fb.im));
  end

  cplx_mult u_derot (.a(y),   .b(rot_neg), .p(x));
  slicer    u_slice (.x(x), .dec(dec), .idx_re(ir), .idx_im(ii), .lvl_re(lr), .lvl_im(li));
  cplx_mult u_rerot (.a(dec), .b(rot_pos), .p(dp));
  eq_error  u_err   (.cma(cma), .y(y), .d(dp), .e(e));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dec_valid <= 1'b0;
      idx_re    <= '0;
      idx_im    <= '0;
      x_soft      <= '0;
      err       <= '0;
      fb_in     <= '0;
      x_r       <= '0;
      lr_r      <= '0;
      li_r      <= '0;
    end else begin
      dec_valid <= ff_valid;
      if (ff_valid) begin
        idx_re <= ir;
        idx_im <= ii;
        x_soft   <= x;
        err    <= e;
        fb_in  <= p2 ? dp : y;
        x_r    <= x;
        lr_r   <= lr;
        li_r   <= li;
      end
    end
  end

  carrier_recovery u_cr (
    .clk, .rst_n, .four_corners, .in_valid(dec_valid && cr_en), .x(x_r),
    .lvl_re(lr_r), .lvl_im(li_r), .rot_neg, .rot_pos, .theta,
    .lf_out(cr_lf_out), .pd_valid, .pd
  );

  // the FFE and FBE sums are formed in step
  assert property (@(posedge clk) disable iff (!rst_n) ff_valid == fb_valid);
endmodule
