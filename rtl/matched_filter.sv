// matched_filter: receive pulse-shaping (root raised cosine) filter.
//
// A 25-tap symmetric FIR at two samples per symbol, applied to both rails of
// the resampled signal. The taps are a root raised cosine with roll-off 0.15
// (the DVB-C value), spanning 12 symbols, Kaiser-windowed (beta 3) and
// scaled so that the centre tap is 512 (1.0 = 1024):
//   h[12 +- k], k = 0..12 : 512 308 -19 -89 16 40 -12 -18 8 7 -4 -2 2
// Symmetric pairs are pre-added, so 13 multiplies per rail.
//
// The receiver places a matched filter after the timing interpolator and
// before the feedforward equalizer; its response is not given there, so the
// roll-off, length and scaling are this design's choices.
//
// Interface: in_valid/in, one sample per valid; out/out_valid one clock
// later.
module matched_filter
  import qam_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t in,
  output logic  out_valid,
  output cplx_t out
);
  localparam int NT = 25;
  localparam int C = 12;
  localparam int signed H [13] = '{512, 308, -19, -89, 16, 40, -12, -18, 8, 7, -4, -2, 2};

  cplx_t line [NT-1];            // past samples, line[0] the newest
  cplx_t w    [NT];              // window: the new sample and the line
  logic signed [DW+15:0] acc_re, acc_im;

  always_comb begin
    w[0] = in;
    for (int k = 1; k < NT; k++) w[k] = line[k-1];
    acc_re = (DW+16)'(w[C].re) * (DW+16)'(H[0]);
    acc_im = (DW+16)'(w[C].im) * (DW+16)'(H[0]);
    for (int k = 1; k <= C; k++) begin
      acc_re += ((DW+16)'(w[C-k].re) + (DW+16)'(w[C+k].re)) * (DW+16)'(H[k]);
      acc_im += ((DW+16)'(w[C-k].im) + (DW+16)'(w[C+k].im)) * (DW+16)'(H[k]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      line      <= '{default: '0};
      out_valid <= 1'b0;
      out       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        line[0] <= in;
        for (int k = 1; k < NT-1; k++) line[k] <= line[k-1];
        out.re <= sat_dw(48'(acc_re >>> 10));
        out.im <= sat_dw(48'(acc_im >>> 10));
      end
    end
  end
endmodule
