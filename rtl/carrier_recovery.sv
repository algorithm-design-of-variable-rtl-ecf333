// carrier_recovery: decision-directed carrier phase and frequency loop.
//
// The equalizer output is de-rotated by e^{-j theta} (by the caller) to x,
// and the slicer returns the decision y. The phase detector is
//   pd = Im[x / y] = (x.im * y.re - x.re * y.im) / |y|^2
// with y in odd-integer levels (-7..7), so pd is about LVL * sin(phase
// error) whatever the amplitude of the constellation point. pd drives a
// lead-lag filter (k1 proportional path, k2 integral path through a delay),
// whose output is added every symbol to the phase accumulator theta (second
// delay). The top 8 bits of theta address a 256-entry ROM holding
//   {round(2047 cos(2 pi i/256)), round(2047 sin(2 pi i/256))}
// as two 12-bit fields (rtl/sincos_rom.hex), registered. The ROM output is
// given as e^{-j theta} for the de-rotator and e^{+j theta} for the
// re-rotator of the decision.
//
// In four-corners mode (blind start-up) the decision is the QPSK corner
// (+-7, +-7) of x's quadrant and the loop only updates on samples whose
// magnitude exceeds CORNER_R, i.e. on the corner points of the
// constellation (radius 7 sqrt(2) LVL = 1267; the next ring is at 1101),
// whatever their rotation.
//
// The de-rotator, the ROM, the Im[x/y] detector, the k1/k2 filter with its
// delay, the phase accumulator and the four-corners coarse tracking follow
// the receiver's carrier loop. The word widths, the gains, the corner
// radius and the ROM size are this design's choices.
//
// Interface: in_valid with x, lvl_re, lvl_im (same cycle). theta and the
// rotators change one and two clocks later. lf_out is the loop filter
// output, for observation.
module carrier_recovery
  import qam_pkg::*;
#(
  parameter int    PH_W       = 24,
  parameter int    KP_SH      = 10,
  parameter int    KI_SH      = 4,
  parameter int    CORNER_R   = 1200,  // corner ring: |x| above this
  parameter string ROM_HEX    = "rtl/sincos_rom.hex"
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   four_corners,
  input  logic                   in_valid,
  input  cplx_t                  x,
  input  logic signed [4:0]      lvl_re,
  input  logic signed [4:0]      lvl_im,
  output cplx_t                  rot_neg,    // e^{-j theta}, amplitude 2047
  output cplx_t                  rot_pos,    // e^{+j theta}
  output logic [PH_W-1:0]        theta,
  output logic signed [PH_W-1:0] lf_out,
  output logic                   pd_valid,
  output logic signed [15:0]     pd
);
  logic [23:0] rom [256];
  initial $readmemh(ROM_HEX, rom);

  logic signed [4:0]  yr, yi;
  logic signed [31:0] num, den, q;
  logic               use_it, lf_valid;
  logic signed [PH_W-1:0] lf_integ;
  logic [23:0]        rom_q;

  always_comb begin
    if (four_corners) begin
      yr = x.re[DW-1] ? -5'sd7 : 5'sd7;
      yi = x.im[DW-1] ? -5'sd7 : 5'sd7;
      use_it = (32'(x.re) * 32'(x.re) + 32'(x.im) * 32'(x.im)) > 32'(CORNER_R) * 32'(CORNER_R);
    end else begin
      yr = lvl_re;
      yi = lvl_im;
      use_it = 1'b1;
    end
    num = 32'(x.im) * 32'(yr) - 32'(x.re) * 32'(yi);
    den = 32'(yr) * 32'(yr) + 32'(yi) * 32'(yi);
    q   = (den == 0) ? 32'sd0 : num / den;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pd_valid <= 1'b0;
      pd       <= '0;
      theta    <= '0;
      rom_q    <= {12'd2047, 12'd0};
    end else begin
      pd_valid <= in_valid && use_it;
      if (in_valid && use_it) pd <= 16'(q);
      if (lf_valid) theta <= theta + PH_W'(lf_out);
      rom_q <= rom[theta[PH_W-1 -: 8]];
    end
  end

  lead_lag_filter #(.IN_W(16), .OUT_W(PH_W), .KP_SH(KP_SH), .KI_SH(KI_SH)) u_lf (
    .clk, .rst_n, .clear(1'b0), .in_valid(pd_valid), .e(pd),
    .out_valid(lf_valid), .out(lf_out), .integ(lf_integ)
  );

  always_comb begin
    rot_pos.re = rom_q[23:12];
    rot_pos.im = rom_q[11:0];
    rot_neg.re = rom_q[23:12];
    rot_neg.im = sat_dw(-48'(signed'(rom_q[11:0])));
  end
endmodule
