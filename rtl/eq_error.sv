// eq_error: error term for the equalizer's coefficient update.
//
// Before lock (cma = 1) the Constant Modulus Algorithm error is used, which
// needs no carrier phase and no decisions:
//   e = y * (R2 - |y|^2) / 2^CMA_SH,  R2 = E|a|^4 / E|a|^2 = 58 LVL^2 (64-QAM)
// with |y|^2 measured in units of LVL^2 (LVL = 128). After lock the
// decision-directed LMS error is used, formed in the passband against the
// re-rotated decision d:
//   e = d - y.
// Both are saturated to DW bits. The CMA/LMS switch, driven by the lock
// signal, and the passband error follow the receiver's blind DFE; the CMA
// constant is the standard one for 64-QAM, and the scaling is this design's
// choice.
//
// Interface: combinational.
module eq_error
  import qam_pkg::*;
#(
  parameter int R2     = 58,   // CMA modulus in units of LVL^2
  parameter int CMA_SH = 5
) (
  input  logic  cma,
  input  cplx_t y,
  input  cplx_t d,
  output cplx_t e
);
  logic signed [31:0] mag2, g;   // |y|^2 / LVL^2 in 8 fractional bits, gain
  logic signed [47:0] er, ei;

  always_comb begin
    mag2 = (32'(y.re) * 32'(y.re) + 32'(y.im) * 32'(y.im)) >>> (2 * $clog2(LVL) - 8);
    g    = (32'(R2) <<< 8) - mag2;
    er   = (48'(y.re) * 48'(g)) >>> (8 + CMA_SH);
    ei   = (48'(y.im) * 48'(g)) >>> (8 + CMA_SH);
    if (cma) begin
      e.re = sat_dw(er);
      e.im = sat_dw(ei);
    end else begin
      e.re = sat_dw(48'(d.re) - 48'(y.re));
      e.im = sat_dw(48'(d.im) - 48'(y.im));
    end
  end
endmodule
