// ffe_dual_mode: dual-mode complex feedforward equalizer with sign-data LMS.
//
// The TAPS coefficients are split into an odd-tap and an even-tap half,
// each with its own delay line of TAPS/2 samples. Input arrives at twice the
// symbol rate as pairs (x_e: the sample at the start of a symbol period,
// x_o: the one half a symbol later), one pair per in_valid. The mode input
// fse plays the part of the two 2:1 multiplexers:
//   fse = 0 (symbol spaced): x_e enters the odd line and the end of the odd
//     line feeds the even line, giving one TAPS-long T-spaced line.
//   fse = 1 (T/2 fractionally spaced): x_o enters the odd line and x_e the
//     even line, giving TAPS taps at T/2 spacing over TAPS/2 symbols.
// Either way the filter runs at the symbol rate.
//
// Each half is built in the hybrid (direct/transposed) pipelined form: its
// taps are grouped into M = ceil(TAPS/2 / N_MOD) modules of N_MOD taps.
// Inside a module the products are summed directly; between modules the
// output path has one register, and the input line one extra register per
// module boundary, so module m reads its taps m samples further down the
// line. Every tap therefore reaches the output through D = M - 1 registers
// in all (D = int((TAPS/2 - 1)/N_MOD) = 3 at the default), and
//   y(n) = sum_k c_k x_k(n - D).
// The error travels the other way, through one register per module, so
// module m sees the error of D - m symbols ago and updates with the data
// that produced it:
//   c_k += mu * e(n-(D-m)) * sgn(x_k*(n-(D-m)-D)),   mu = 2^-(MU_SH+12) per error LSB
// where sgn of a complex value takes the sign of each rail. Each line is 2D
// samples longer than its taps so that this data is at hand. Coefficients
// are kept with 8 extra fraction bits; the top CW bits are used, with 1.0 =
// 2^12. Reset loads 1.0 into tap INIT_TAP and zero elsewhere, so the reset
// response is the input delayed by INIT_TAP + D symbols.
//
// The 24 taps, the odd/even split with the two multiplexers, the symbol-rate
// operation, input sign LMS, the module size of 3 and the pipelined hybrid
// form with its delayed update follow the receiver's equalizer. The module
// sums are ordinary adders rather than carry-save adders; the widths, the
// step size and the initial tap are this design's choices.
//
// Interface: in_valid shifts a pair in; y/out_valid follow two clocks later.
// err/err_valid (with upd_en high) apply one update; they must come before
// the next in_valid.
module ffe_dual_mode
  import qam_pkg::*;
#(
  parameter int TAPS     = 24,
  parameter int N_MOD    = 3,     // taps per pipeline module
  parameter int MU_SH    = 8,     // 0..8
  parameter int INIT_TAP = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  fse,
  input  logic  in_valid,
  input  cplx_t x_e,
  input  cplx_t x_o,
  input  logic  upd_en,
  input  logic  err_valid,
  input  cplx_t err,
  output logic  out_valid,
  output cplx_t y
);
  localparam int H  = TAPS / 2;
  localparam int M  = (H + N_MOD - 1) / N_MOD;  // modules per half
  localparam int D  = M - 1;                    // = int((H-1)/N_MOD)
  localparam int L  = H + 2 * D;                // line length per half
  localparam int AW = CW + 8;                   // coefficient accumulator width
  localparam int PW = 2 * DW + CW + 4;          // partial-sum width
  logic calc;   // the cycle after a shift: the module sums are formed

  cplx_t              odd_l [L];
  cplx_t              even_l[L];
  cplx_t              ech   [D+1];    // error chain, ech[0] = previous error
  logic signed [AW-1:0] c_re [TAPS];  // [0..H-1] odd half, [H..TAPS-1] even half
  logic signed [AW-1:0] c_im [TAPS];
  logic signed [PW-1:0] p_re [M], p_im [M];        // module sums
  logic signed [PW-1:0] s_re [D], s_im [D];        // output-path registers
  logic signed [PW-1:0] y_re, y_im;

  function automatic cplx_t tap_x(input int k, input int off);
    return (k < H) ? odd_l[k + off] : even_l[k - H + off];
  endfunction

  // module m of either half sees its taps through m extra input registers
  function automatic int mod_of(input int k);
    return (k % H) / N_MOD;
  endfunction

  // error seen by module m: D - m registers along the error path
  function automatic cplx_t err_at(input int m);
    return (m == D) ? err : ech[D - m - 1];
  endfunction

  always_comb begin
    for (int m = 0; m < M; m++) begin
      p_re[m] = '0;
      p_im[m] = '0;
    end
    for (int k = 0; k < TAPS; k++) begin
      automatic int m = mod_of(k);
      automatic cplx_t xv = tap_x(k, m);
      automatic logic signed [CW-1:0] cr = c_re[k][AW-1 -: CW];
      automatic logic signed [CW-1:0] ci = c_im[k][AW-1 -: CW];
      p_re[m] += PW'(xv.re) * PW'(cr) - PW'(xv.im) * PW'(ci);
      p_im[m] += PW'(xv.re) * PW'(ci) + PW'(xv.im) * PW'(cr);
    end
    y_re = p_re[M-1] + ((D > 0) ? s_re[D-1] : '0);
    y_im = p_im[M-1] + ((D > 0) ? s_im[D-1] : '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      odd_l     <= '{default: '0};
      even_l    <= '{default: '0};
      ech       <= '{default: '0};
      s_re      <= '{default: '0};
      s_im      <= '{default: '0};
      calc      <= 1'b0;
      out_valid <= 1'b0;
      y         <= '0;
      for (int k = 0; k < TAPS; k++) begin
        c_re[k] <= (k == INIT_TAP) ? (AW'(1) <<< (12 + 8)) : '0;
        c_im[k] <= '0;
      end
    end else begin
      calc      <= in_valid;
      out_valid <= calc;
      if (calc) begin
        // output path: module m's sum joins after the registers of modules
        // 0..m-1, so every tap reaches y after D symbols in all
        y.re <= sat_dw(48'(y_re >>> 12));
        y.im <= sat_dw(48'(y_im >>> 12));
        s_re[0] <= p_re[0];
        s_im[0] <= p_im[0];
        for (int m = 1; m < D; m++) begin
          s_re[m] <= s_re[m-1] + p_re[m];
          s_im[m] <= s_im[m-1] + p_im[m];
        end
      end
      if (in_valid) begin
        odd_l[0]  <= fse ? x_o : x_e;
        even_l[0] <= fse ? x_e : odd_l[H-1];
        for (int k = 1; k < L; k++) begin
          odd_l[k]  <= odd_l[k-1];
          even_l[k] <= even_l[k-1];
        end
      end
      if (err_valid) begin
        ech[0] <= err;
        for (int k = 1; k <= D; k++) ech[k] <= ech[k-1];
        if (upd_en) begin
          for (int k = 0; k < TAPS; k++) begin
            // the error of D - m symbols ago met the data x(n - (D-m) - D)
            automatic int    m  = mod_of(k);
            automatic cplx_t ev = err_at(m);
            automatic cplx_t xv = tap_x(k, 2 * D - m);
            // e * sgn(x*): sgn(x*) = sr - j si
            automatic logic signed [AW-1:0] er = AW'(ev.re) <<< (8 - MU_SH);
            automatic logic signed [AW-1:0] ei = AW'(ev.im) <<< (8 - MU_SH);
            c_re[k] <= c_re[k] + (xv.re[DW-1] ? -er : er) + (xv.im[DW-1] ? -ei : ei);
            c_im[k] <= c_im[k] + (xv.re[DW-1] ? -ei : ei) - (xv.im[DW-1] ? -er : er);
          end
        end
      end
    end
  end
endmodule
