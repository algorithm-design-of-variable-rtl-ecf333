// tb_interp_filter: feeds a slow complex sinusoid and asks for samples at
// random fractional intervals mu. Each output must match the sinusoid at
// the time of line[8] plus mu/32 (within 1% of full scale); for mu = 0 it
// must equal line[8] exactly. The output must follow the strobe by one
// clock.
`include "tb/tb_check.svh"
module tb_interp_filter;
  import qam_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, strobe = 0, out_valid;
  logic [4:0] mu = 0;
  cplx_t in, out;
  int checks = 0, failures = 0;
  int n = 0;            // samples fed
  real exp_re, exp_im;
  int  exact;
  real f = 0.061;

  interp_filter dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  function automatic int smp(int i, bit q);
    return int'($floor(1000.0 * (q ? $sin(6.283185307 * f * i) : $cos(6.283185307 * f * i)) + 0.5));
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      in_valid = 1; strobe = 0;
      in.re = 12'(smp(n, 0)); in.im = 12'(smp(n, 1));
      n++;
      @(negedge clk);
      in_valid = 0;
      if (n > 20) begin
        automatic real t;
        strobe = 1;
        mu = (i % 4 == 0) ? 5'd0 : 5'($urandom);
        // line[8] holds sample n-9
        t = real'(n - 9) + real'(mu) / 32.0;
        exp_re = 1000.0 * $cos(6.283185307 * f * t);
        exp_im = 1000.0 * $sin(6.283185307 * f * t);
        exact = smp(n - 9, 0);
        @(negedge clk);
        strobe = 0;
        `CHECK(out_valid, "output one clock after strobe")
        `CHECK(fabs(real'(int'(out.re)) - exp_re) < 20.0 && fabs(real'(int'(out.im)) - exp_im) < 20.0, "interpolated value")
        if (mu == 0) `CHECK(int'(out.re) == exact, "mu = 0 returns line[8]")
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
