// cplx_mult: complex multiplier used as rotator and de-rotator.
//
// p = a * b / 2^SH, where b is typically a unit phasor cos + j sin with
// amplitude 2^SH - 1. The result is truncated (arithmetic shift) and
// saturated to DW bits per rail. Combinational.
module cplx_mult
  import qam_pkg::*;
#(
  parameter int SH = 11
) (
  input  cplx_t a,
  input  cplx_t b,
  output cplx_t p
);
  logic signed [2*DW+1:0] pr, pi;
  always_comb begin
    pr = (2*DW+2)'(a.re) * (2*DW+2)'(b.re) - (2*DW+2)'(a.im) * (2*DW+2)'(b.im);
    pi = (2*DW+2)'(a.re) * (2*DW+2)'(b.im) + (2*DW+2)'(a.im) * (2*DW+2)'(b.re);
    p.re = sat_dw(48'(pr >>> SH));
    p.im = sat_dw(48'(pi >>> SH));
  end
endmodule
