// fbe: complex feedback equalizer with sign-data LMS update.
//
// A TAPS-long delay line holds the past feedback samples d (one per
// symbol). Its output z = sum_k b[k] * d[k] is subtracted from the
// feedforward output by the caller, so the update that reduces the error
// e = decision - y is
//   b_k(n+1) = b_k(n) - mu * e(n) * sgn(d*(n-k)),   mu = 2^-(MU_SH+12) per error LSB.
// Coefficients carry 8 extra fraction bits, the top CW bits being used with
// 1.0 = 2^12, and reset to zero.
//
// The 24 feedback taps and LMS adaptation follow the receiver's DFE; the
// sign-data form is taken from its feedforward update, and the widths, step
// and reset values are this design's choices.
//
// Interface: in_valid shifts d in; z/out_valid follow two clocks later.
// err_valid with upd_en applies one update before the next in_valid.
module fbe
  import qam_pkg::*;
#(
  parameter int TAPS  = 24,
  parameter int MU_SH = 8    // 0..8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t d,
  input  logic  upd_en,
  input  logic  err_valid,
  input  cplx_t err,
  output logic  out_valid,
  output cplx_t z
);
  logic calc;   // the cycle after a shift: the sum is formed
  localparam int AW = CW + 8;

  cplx_t                   line [TAPS];
  logic signed [AW-1:0]    b_re [TAPS];
  logic signed [AW-1:0]    b_im [TAPS];
  logic signed [2*DW+CW:0] acc_re, acc_im;

  always_comb begin
    acc_re = '0;
    acc_im = '0;
    for (int k = 0; k < TAPS; k++) begin
      automatic logic signed [CW-1:0] br = b_re[k][AW-1 -: CW];
      automatic logic signed [CW-1:0] bi = b_im[k][AW-1 -: CW];
      acc_re += (2*DW+CW+1)'(line[k].re) * (2*DW+CW+1)'(br) - (2*DW+CW+1)'(line[k].im) * (2*DW+CW+1)'(bi);
      acc_im += (2*DW+CW+1)'(line[k].re) * (2*DW+CW+1)'(bi) + (2*DW+CW+1)'(line[k].im) * (2*DW+CW+1)'(br);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      line      <= '{default: '0};
      b_re      <= '{default: '0};
      b_im      <= '{default: '0};
      calc      <= 1'b0;
      out_valid <= 1'b0;
      z         <= '0;
    end else begin
      calc      <= in_valid;
      out_valid <= calc;
      if (calc) begin
        z.re <= sat_dw(48'(acc_re >>> 12));
        z.im <= sat_dw(48'(acc_im >>> 12));
      end
      if (in_valid) begin
        line[0] <= d;
        for (int k = 1; k < TAPS; k++) line[k] <= line[k-1];
      end
      if (err_valid && upd_en) begin
        for (int k = 0; k < TAPS; k++) begin
          automatic logic signed [AW-1:0] er = AW'(err.re) <<< (8 - MU_SH);
          automatic logic signed [AW-1:0] ei = AW'(err.im) <<< (8 - MU_SH);
          b_re[k] <= b_re[k] - ((line[k].re[DW-1] ? -er : er) + (line[k].im[DW-1] ? -ei : ei));
          b_im[k] <= b_im[k] - ((line[k].re[DW-1] ? -ei : ei) - (line[k].im[DW-1] ? -er : er));
        end
      end
    end
  end
endmodule
