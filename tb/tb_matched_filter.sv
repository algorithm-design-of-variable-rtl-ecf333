// tb_matched_filter: checks that the impulse response is the 25-tap
// symmetric root-raised-cosine set (within rounding of the formula
// rrc(t) * kaiser, alpha 0.15, scaled to a 512 centre), and that random
// input gives exactly the convolution with those taps (>>> 10), one output
// per input, one clock later.
`include "tb/tb_check.svh"
module tb_matched_filter;
  import qam_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  cplx_t in, out;
  int checks = 0, failures = 0;
  int h [25] = '{2, -2, -4, 7, 8, -18, -12, 40, 16, -89, -19, 308, 512,
                 308, -19, -89, 16, 40, -12, -18, 8, 7, -4, -2, 2};
  int xs [$], ys [$];

  matched_filter dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (out_valid && rst_n) ys.push_back(int'(out.re));

  // unwindowed root raised cosine, roll-off 0.15, two samples per symbol
  function automatic real rrc(real t);
    real a = 0.15, pi = 3.14159265358979;
    if (t > -1e-9 && t < 1e-9) return 1.0 - a + 4.0 * a / pi;
    return ($sin(pi * t * (1.0 - a)) + 4.0 * a * t * $cos(pi * t * (1.0 + a))) /
           (pi * t * (1.0 - (4.0 * a * t) ** 2));
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // the taps follow the root raised cosine shape near the centre
    for (int k = 0; k < 4; k++) begin
      automatic real r = rrc(real'(k) / 2.0) / rrc(0.0) * 512.0;
      automatic real d = r - real'(h[12 + k]);
      `CHECK(d < 25.0 && d > -25.0, "tap follows rrc")
    end
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      in_valid = 1;
      in.re = (i == 0) ? 12'sd1024 : (i < 40) ? 12'sd0 : 12'($urandom_range(0, 3000) - 1500);
      in.im = 12'sd0;
      xs.push_back(int'(in.re));
      @(negedge clk);
      in_valid = 0;
    end
    repeat (2) @(negedge clk);
    `CHECK(ys.size() == 300, "one output per input")
    for (int n = 0; n < 300; n++) begin
      automatic longint acc = 0;
      automatic int e;
      for (int k = 0; k < 25; k++) if (n - k >= 0) acc += longint'(h[k]) * xs[n - k];
      e = int'(acc >>> 10);
      e = e > 2047 ? 2047 : e < -2048 ? -2048 : e;
      `CHECK(ys[n] == e, "convolution")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
