// tb_blind_dfe: blind start-up of the equalizer with carrier recovery.
// Random 64-QAM symbols (level unit 128) pass through a T/2-spaced channel
// with an echo, g = {0.45, 1, 0.45, 0.1, 0.25j, 0.1} (half-symbol taps), and
// a carrier offset of 20 degrees plus 0.01 degrees per symbol, then enter
// the equalizer in T/2 mode as (x_e, x_o) pairs, one symbol per six clocks.
// The controls are stepped as in the receiver: CMA with four-corners
// carrier tracking on path p1, DD-LMS on p1, then decision feedback on p2.
// In each phase the share of decisions equal to the sent symbols (at the
// delay and the quarter-turn rotation that fit best, which blind start-up
// cannot resolve) is measured; in the final phase at least 99% must be
// right, and the carrier loop must have moved.
`include "tb/tb_check.svh"
module tb_blind_dfe;
  import qam_pkg::*;
  logic clk = 0, rst_n = 0, fse = 1, eq_upd_en = 1, cr_en = 1, cma = 1, four_corners = 1, p2 = 0;
  logic sym_valid = 0, dec_valid;
  cplx_t x_e, x_o, x_soft, err;
  logic [2:0] idx_re, idx_im;
  logic signed [23:0] cr_lf_out;
  int checks = 0, failures = 0;
  localparam int N = 16000;
  int ar [N], ai [N];
  int dr [$], di [$];
  real pi = 3.14159265358979;

  blind_dfe dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && dec_valid) begin
    dr.push_back(2 * int'(idx_re) - 7);
    di.push_back(2 * int'(idx_im) - 7);
  end

  // fraction of right decisions in [from, to) over delays and rotations
  function automatic real score(int from, int to);
    real best = 0;
    for (int dly = 0; dly < 20; dly++)
      for (int rot = 0; rot < 4; rot++) begin
        int ok = 0;
        for (int n = from; n < to; n++) begin
          int sr = ar[n - dly], si = ai[n - dly], t;
          for (int q = 0; q < rot; q++) begin t = sr; sr = -si; si = t; end
          if (dr[n] == sr && di[n] == si) ok++;
        end
        if (real'(ok) / real'(to - from) > best) best = real'(ok) / real'(to - from);
      end
    return best;
  endfunction

  function automatic int sat(real v);
    return v > 2047.0 ? 2047 : v < -2048.0 ? -2048 : int'(v);
  endfunction

  initial begin
    real gr [6] = '{0.45, 1.0, 0.45, 0.1, 0.0, 0.1};
    real gi [6] = '{0.0, 0.0, 0.0, 0.0, 0.25, 0.0};
    real s_cma, s_lms, s_dfe;
    for (int n = 0; n < N; n++) begin
      ar[n] = int'($urandom_range(0, 7)) * 2 - 7;
      ai[n] = int'($urandom_range(0, 7)) * 2 - 7;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < N; n++) begin
      automatic real xr [2], xi [2];
      automatic real phi = 20.0 * pi / 180.0 + 0.01 * pi / 180.0 * real'(n);
      // half-symbol samples 2n+1 (x_e) and 2n+2 (x_o) of sum_k a_k g[m - 2k]
      for (int h = 0; h < 2; h++) begin
        automatic real vr = 0, vi = 0;
        automatic int m = 2 * n + 1 + h;
        for (int j = 0; j < 6; j++)
          if ((m - j) % 2 == 0 && (m - j) / 2 >= 0 && (m - j) / 2 < N) begin
            automatic int k = (m - j) / 2;
            vr += 128.0 * (ar[k] * gr[j] - ai[k] * gi[j]);
            vi += 128.0 * (ar[k] * gi[j] + ai[k] * gr[j]);
          end
        xr[h] = vr * $cos(phi) - vi * $sin(phi);
        xi[h] = vr * $sin(phi) + vi * $cos(phi);
      end
      cma = (n < 8000); four_corners = (n < 8000);
      p2 = (n >= 12000);
      @(negedge clk);
      x_e.re = 12'(sat(xr[0] * 0.75)); x_e.im = 12'(sat(xi[0] * 0.75));
      x_o.re = 12'(sat(xr[1] * 0.75)); x_o.im = 12'(sat(xi[1] * 0.75));
      sym_valid = 1;
      @(negedge clk); sym_valid = 0;
      repeat (4) @(negedge clk);
    end
    repeat (6) @(negedge clk);
    s_cma = score(7000, 8000);
    s_lms = score(11000, 12000);
    s_dfe = score(15000, 16000);
    $display("INFO right decisions: end of CMA %f, end of LMS %f, end of DFE %f; decisions %0d",
             s_cma, s_lms, s_dfe, dr.size());
    `CHECK(dr.size() == N, "one decision per symbol")
    `CHECK(s_cma > 0.3, "CMA with four corners opens the eye")
    `CHECK(s_lms > 0.99, "DD-LMS on path p1 recovers the symbols")
    `CHECK(s_dfe > 0.99, "decision-directed DFE on path p2 recovers the symbols")
    `CHECK(cr_lf_out != 0, "carrier loop active")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
