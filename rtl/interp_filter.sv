// interp_filter: 16-tap polyphase FIR interpolator for timing recovery.
//
// The samples arriving at f_s/2 are kept in a 16-deep delay line (line[0]
// newest). When the NCO asks for a sample (strobe) with fractional interval
// mu, the filter returns the value of the underlying signal at the instant
// mu sample periods after line[8], that is between line[8] and line[7]:
//   y = sum_k c[mu][k] * line[k] / 1024.
// The coefficient set for each of PHASES quantised values of mu is read from
// a ROM. Coefficient k of phase p is
//   round(1024 * sinc(d) * (1 + cos(pi d / 8.5)) / 2),  d = p/PHASES - (8 - k),
// a Hann-windowed sinc, stored as 12-bit two's complement in
// rtl/interp_coef.hex (phase-major, 16 words per phase).
//
// That a 16-tap FIR interpolator (designed for minimum mean square error)
// resamples the signal onto the NCO's virtual clock follows the receiver's
// specification. The windowed-sinc coefficients standing in for an MMSE
// design, the 32 phases and the widths are this design's choices.
//
// Interface: in_valid shifts a complex sample in. strobe with mu (valid the
// same cycle) requests one output, which appears on out/out_valid one clock
// later, computed from the line as it was in the strobe cycle.
module interp_filter
  import qam_pkg::*;
#(
  parameter int    TAPS     = 16,
  parameter int    PHASES   = 32,
  parameter int    MU_W     = 5,          // log2(PHASES)
  parameter string COEF_HEX = "rtl/interp_coef.hex"
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  cplx_t            in,
  input  logic             strobe,
  input  logic [MU_W-1:0]  mu,
  output logic             out_valid,
  output cplx_t            out
);
  logic signed [11:0] rom [PHASES*TAPS];
  initial $readmemh(COEF_HEX, rom);

  cplx_t line [TAPS];
  logic signed [DW+16:0] acc_re, acc_im;

  always_comb begin
    acc_re = '0;
    acc_im = '0;
    for (int k = 0; k < TAPS; k++) begin
      acc_re += (DW+17)'(line[k].re) * (DW+17)'(rom[int'(mu)*TAPS + k]);
      acc_im += (DW+17)'(line[k].im) * (DW+17)'(rom[int'(mu)*TAPS + k]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      line      <= '{default: '0};
      out_valid <= 1'b0;
      out       <= '0;
    end else begin
      out_valid <= strobe;
      if (strobe) begin
        out.re <= sat_dw(48'(acc_re >>> 10));
        out.im <= sat_dw(48'(acc_im >>> 10));
      end
      if (in_valid) begin
        line[0] <= in;
        for (int k = 1; k < TAPS; k++) line[k] <= line[k-1];
      end
    end
  end
endmodule
