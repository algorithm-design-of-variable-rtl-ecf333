// halfband_csd: the shared 19-tap half-band filter core, multiplier-free.
//
// Computes one output of the symmetric half-band filter from 19 stored
// samples (x[0] newest). A half-band filter has every other coefficient equal
// to zero apart from the centre one, so only the centre tap (1/2) and the ten
// odd-distance taps are non-zero. Those ten coefficients are realised in
// canonic signed digit form as shifts and adds on the pre-added symmetric
// sample pairs, all scaled by 2^10:
//   distance  coefficient  CSD form
//   0         512          2^9
//   1         317          2^8 + 2^6 - 2^2 + 2^0
//   3         -84          -(2^6 + 2^4 + 2^2)
//   5         31           2^5 - 2^0
//   7         -9           -(2^3 + 2^0)
//   9         1            2^0
// The coefficients sum to 1024, so the DC gain is exactly one. The 19-tap
// length, the ten non-zero CSD coefficients and the one-core use follow the
// receiver's specification; the coefficient values are this design's own:
// a Kaiser-windowed (beta 5) half-band sinc rounded to 10 fractional bits.
//
// Interface: purely combinational; y is rounded down (arithmetic shift) and
// saturated to DW bits.
module halfband_csd
  import qam_pkg::*;
(
  input  logic signed [DW-1:0] x [19],
  output logic signed [DW-1:0] y
);
  localparam int AW = DW + 12;
  logic signed [AW-1:0] s1, s3, s5, s7, s9, c0, acc;

  always_comb begin
    // symmetric pairs around the centre x[9]
    s1 = AW'(x[8]) + AW'(x[10]);
    s3 = AW'(x[6]) + AW'(x[12]);
    s5 = AW'(x[4]) + AW'(x[14]);
    s7 = AW'(x[2]) + AW'(x[16]);
    s9 = AW'(x[0]) + AW'(x[18]);
    c0 = AW'(x[9]);
    acc = (c0 <<< 9)
        + (s1 <<< 8) + (s1 <<< 6) - (s1 <<< 2) + s1
        - (s3 <<< 6) - (s3 <<< 4) - (s3 <<< 2)
        + (s5 <<< 5) - s5
        - (s7 <<< 3) - s7
        + s9;
    y = sat_dw(48'(acc >>> 10));
  end
endmodule
