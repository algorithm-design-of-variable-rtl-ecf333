// tb_timing_recovery: closed-loop test of the timing loop.
// A random 4-QAM signal (levels +-600) with raised-cosine pulses (roll-off
// 0.5) is generated at the loop's input rate with R = 1.3 input samples per
// output sample (symbol period 2.6 inputs). The nominal step word is set
// 300 ppm off the true rate and the signal starts at a random timing phase.
// After acquisition the loop must
//  - give exactly two outputs per symbol on average (rate 2 f_T),
//  - hold its integral path away from zero (the frequency offset was found),
//  - put one of the two samples of each symbol on the symbol centre: its
//    rails must sit within 15% of +-600.
`include "tb/tb_check.svh"
module tb_timing_recovery;
  import qam_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic loop_en = 1;
  logic [39:0] w_nom;
  cplx_t in, out;
  logic signed [23:0] lf_out;
  int checks = 0, failures = 0;
  int nout = 0, nin = 0, good [2], tot [2];
  localparam int NS = 5000;
  localparam real TS = 2.6;        // inputs per symbol
  real ar [NS], ai [NS];

  timing_recovery dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rc(real t);
    real d;
    if (t > -1e-9 && t < 1e-9) return 1.0;
    d = 1.0 - t * t;
    if (d > -1e-6 && d < 1e-6) return 0.25 * 3.14159265 * $sin(3.14159265 * 0.5) / (3.14159265 * 0.5) * 0.5 * 2.0 / 3.14159265 * 3.14159265 / 2.0;
    return $sin(3.14159265 * t) / (3.14159265 * t) * $cos(3.14159265 * 0.5 * t) / d;
  endfunction

  int k_out = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    nout++;
    if (nin > 2 * NS / 3 * 26 / 10) begin
      automatic int p = k_out % 2;
      automatic int vr = int'(out.re) < 0 ? -int'(out.re) : int'(out.re);
      automatic int vi = int'(out.im) < 0 ? -int'(out.im) : int'(out.im);
      tot[p]++;
      if (vr > 510 && vr < 690 && vi > 510 && vi < 690) good[p]++;
    end
    k_out++;
  end

  initial begin
    real t0 = 0.37, v_re, v_im;
    int n_at;
    for (int k = 0; k < NS; k++) begin
      ar[k] = ($urandom % 2) ? 600.0 : -600.0;
      ai[k] = ($urandom % 2) ? 600.0 : -600.0;
    end
    // nominal step: 1/1.3 of 2^40, 300 ppm slow
    w_nom = 40'(longint'(real'(64'd1099511627776) / 1.3 * (1.0 - 300e-6)));
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < int'(real'(NS - 10) * TS); n++) begin
      automatic real t = (real'(n) + t0) / TS;
      v_re = 0; v_im = 0;
      for (int k = int'($floor(t)) - 8; k <= int'($floor(t)) + 8; k++)
        if (k >= 0 && k < NS) begin
          v_re += ar[k] * rc(t - real'(k));
          v_im += ai[k] * rc(t - real'(k));
        end
      @(negedge clk);
      in_valid = 1; in.re = 12'(int'(v_re)); in.im = 12'(int'(v_im));
      nin++;
      if (n == 2000) n_at = nout;
      @(negedge clk);
      in_valid = 0;
    end
    repeat (4) @(negedge clk);
    begin
      automatic real rate = real'(nout - n_at) / (real'(nin - 2001) / TS);
      automatic int best = (good[0] > good[1]) ? 0 : 1;
      $display("INFO outputs per symbol %f, lf_out %0d, centre hits %0d/%0d and %0d/%0d",
               rate, lf_out, good[0], tot[0], good[1], tot[1]);
      `CHECK(rate > 1.99 && rate < 2.01, "two samples per symbol")
      `CHECK(dut.u_lf.integ != 0, "integral path holds the frequency offset")
      `CHECK(real'(good[best]) > 0.95 * real'(tot[best]), "symbol-centre samples")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
