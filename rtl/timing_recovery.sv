// timing_recovery: all-digital symbol timing recovery loop.
//
// The sampling clock is left free-running; the loop instead resamples the
// decimated signal (rate f_s/2) onto a virtual clock at twice the symbol
// rate. The NCO adds its step word w to a 40-bit phase on every input; an
// overflow enables one interpolator output (the gated clock) and the phase
// left over gives the fractional interval
//   mu = (w - u) / w   (top 12 bits of each, quantised to 5 bits)
// which places the wanted instant between the two newest samples. The
// interpolator output is both the loop's output (to the matched filter) and
// the input of the band-edge timing error detector, whose once-per-symbol
// error passes through the lead-lag filter. The filter output corrects the
// nominal step word: w = w_nom - ((lf_out) <<< W_SH).
//
// The loop (interpolator, error detector, lead-lag filter, NCO giving u and
// the gated clock) follows the receiver's timing recovery architecture.
// Computing mu by a small division, the sign and scaling of the correction
// and the loop gains are this design's choices.
//
// Interface: in_valid/in at f_s/2; w_nom = 2^40 * 2 f_T / (f_s/2) sets the
// symbol rate. out_valid/out at 2 f_T (about every 2 to 4 inputs).
// lf_out is the lead-lag filter output for observation.
module timing_recovery
  import qam_pkg::*;
#(
  parameter int PW    = 40,
  parameter int LF_W  = 24,
  parameter int KP_SH = 6,
  parameter int KI_SH = 0,
  parameter int W_SH  = 17
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   loop_en,
  input  logic [PW-1:0]          w_nom,
  input  logic                   in_valid,
  input  cplx_t                  in,
  output logic                   out_valid,
  output cplx_t                  out,
  output logic signed [LF_W-1:0] lf_out
);
  logic              strobe;
  logic [PW-1:0]     u, w;
  logic [4:0]        mu;
  logic [11:0]       wt, ut;
  logic [17:0]       q;
  logic              ted_valid, lf_valid;
  logic signed [15:0] ted_err;
  logic signed [LF_W-1:0] lf_integ;

  timing_nco #(.PW(PW)) u_nco (
    .clk, .rst_n, .in_valid, .w, .strobe, .u
  );

  always_comb begin
    w  = w_nom - PW'(lf_out <<< W_SH);
    wt = w[PW-1 -: 12];
    ut = u[PW-1 -: 12];
    q  = (wt == 12'd0) ? 18'd0 : ({6'd0, (ut < wt) ? (wt - ut) : 12'd0} << 5) / {6'd0, wt};
    mu = (q > 18'd31) ? 5'd31 : q[4:0];
  end

  interp_filter u_interp (
    .clk, .rst_n, .in_valid, .in, .strobe, .mu, .out_valid, .out
  );

  timing_error_detector u_ted (
    .clk, .rst_n, .in_valid(out_valid), .in(out), .err_valid(ted_valid), .err(ted_err)
  );

  lead_lag_filter #(.IN_W(16), .OUT_W(LF_W), .KP_SH(KP_SH), .KI_SH(KI_SH)) u_lf (
    .clk, .rst_n, .clear(!loop_en), .in_valid(ted_valid), .e(ted_err),
    .out_valid(lf_valid), .out(lf_out), .integ(lf_integ)
  );
endmodule
