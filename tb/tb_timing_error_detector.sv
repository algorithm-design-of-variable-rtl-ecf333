// tb_timing_error_detector: two tests.
//  1. Random input: with p = Im(conj(s1) s2) of the two leaky band-pass
//     recursions s1 = x - j(1-1/8)s1, s2 = x + j(1-1/8)s2, modelled here,
//     every error sample must equal (p[n] - p[n-1]) >>> 11, on every second
//     input.
//  2. S-curve: a random 4-QAM signal with raised-cosine pulses (roll-off
//     0.5) sampled at two samples per symbol with a timing offset tau. The
//     mean error must be near zero for tau = 0, and have opposite signs for
//     tau = +T/8 and -T/8 (negative for late sampling).
`include "tb/tb_check.svh"
module tb_timing_error_detector;
  import qam_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, err_valid;
  cplx_t in;
  logic signed [15:0] err;
  int checks = 0, failures = 0;
  longint s1r, s1i, s2r, s2i, n1r, n1i, n2r, n2i;
  int ph = 0;
  longint pprev = 0;
  longint exp_q [$];
  real acc; int nacc;

  timing_error_detector dut (.*);
  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint lk(longint v);
    return v - (v >>> 3);
  endfunction
  function automatic longint sat16(longint v);
    return v > 32767 ? 32767 : v < -32768 ? -32768 : v;
  endfunction

  function automatic real rc(real t);   // raised cosine, T = 1, roll-off 0.5
    real d;
    if (t > -1e-9 && t < 1e-9) return 1.0;
    d = 1.0 - (2.0 * 0.5 * t) ** 2;
    if (d > -1e-9 && d < 1e-9) return 0.5 * $sin(3.14159265 / 1.0) / 3.14159265; // limit (pi/4 sinc(1/(2a)))
    return $sin(3.14159265 * t) / (3.14159265 * t) * $cos(3.14159265 * 0.5 * t) / d;
  endfunction

  always @(posedge clk) if (rst_n && err_valid) begin
    if (exp_q.size() > 0) begin
      automatic longint ex = exp_q.pop_front();
      if (nacc < 0) `CHECK(longint'(err) == ex, "error value")
    end
    acc += real'(err);
  end

  task automatic send(int re, int im);
    @(negedge clk);
    in_valid = 1; in.re = 12'(re); in.im = 12'(im);
    n1r = re + lk(s1i); n1i = im - lk(s1r);
    n2r = re - lk(s2i); n2i = im + lk(s2r);
    s1r = n1r; s1i = n1i; s2r = n2r; s2i = n2i;
    if (ph == 1) exp_q.push_back(sat16(((n1r * n2i - n1i * n2r) - pprev) >>> 11));
    pprev = n1r * n2i - n1i * n2r;
    ph ^= 1;
    @(negedge clk); in_valid = 0;
  endtask

  real m [3];
  initial begin
    s1r = 0; s1i = 0; s2r = 0; s2i = 0; nacc = -1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) send(int'($urandom_range(0, 2000)) - 1000, int'($urandom_range(0, 2000)) - 1000);
    repeat (3) @(negedge clk);
    // S-curve
    for (int c = 0; c < 3; c++) begin
      automatic real tau = (c == 0) ? 0.0 : (c == 1) ? 0.125 : -0.125;
      automatic int NS = 3000;
      automatic real ar [], ai [];
      ar = new[NS]; ai = new[NS];
      for (int k = 0; k < NS; k++) begin
        ar[k] = ($urandom % 2) ? 600.0 : -600.0;
        ai[k] = ($urandom % 2) ? 600.0 : -600.0;
      end
      acc = 0; nacc = 0;
      for (int n = 0; n < 2 * NS; n++) begin
        automatic real t = real'(n) / 2.0 + tau, vr = 0, vi = 0;
        for (int k = int'($floor(t)) - 8; k <= int'($floor(t)) + 8; k++)
          if (k >= 0 && k < NS) begin
            vr += ar[k] * rc(t - real'(k));
            vi += ai[k] * rc(t - real'(k));
          end
        if (n == 200) acc = 0;
        send(int'(vr), int'(vi));
      end
      m[c] = acc;
      $display("INFO tau=%f mean error sum=%f", tau, acc);
    end
    `CHECK(m[1] < 0 && m[2] > 0, "S-curve sign")
    `CHECK((m[0] < 0 ? -m[0] : m[0]) < 0.25 * (m[1] < 0 ? -m[1] : m[1]), "zero error at the symbol centre")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
