// slicer: 64-QAM decision device.
//
// Each rail of the de-rotated sample x is mapped to the nearest of the eight
// levels (2i - 7) * LVL, i = 0..7, with LVL = 128 in a 12-bit sample. Since
// the decision boundaries are multiples of 2*LVL = 256, the level index is
// (x + 8 LVL) shifted right by log2(2 LVL), clamped to 0..7. A value on a
// boundary goes to the upper level.
//
// The 64-QAM constellation follows the receiver's specification; the level spacing and the index coding are this design's
// choices.
//
// Interface: combinational. dec is the decision as a complex sample, idx_re
// and idx_im are the level indices 0..7 (symbol bits to the FEC), lvl_re and
// lvl_im the odd integer levels -7..7.
module slicer
  import qam_pkg::*;
(
  input  cplx_t              x,
  output cplx_t              dec,
  output logic [2:0]         idx_re,
  output logic [2:0]         idx_im,
  output logic signed [4:0]  lvl_re,
  output logic signed [4:0]  lvl_im
);
  localparam int SH = $clog2(2 * LVL);

  function automatic logic [2:0] index(input logic signed [DW-1:0] v);
    logic signed [DW+1:0] t;
    t = ((DW+2)'(v) + (DW+2)'(8 * LVL)) >>> SH;
    if (t < 0)      return 3'd0;
    else if (t > 7) return 3'd7;
    else            return t[2:0];
  endfunction

  always_comb begin
    idx_re = index(x.re);
    idx_im = index(x.im);
    lvl_re = 5'(signed'({2'b00, idx_re}) * 2 - 7);
    lvl_im = 5'(signed'({2'b00, idx_im}) * 2 - 7);
    dec.re = DW'(lvl_re * LVL);
    dec.im = DW'(lvl_im * LVL);
  end
endmodule
