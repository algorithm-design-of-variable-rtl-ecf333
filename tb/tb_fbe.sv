// tb_fbe: the feedback equalizer alone, used as y = -z (its sign in the
// DFE). After reset z must be zero. With the error e = t - y returned for
// a target t = -(0.5 d(n-2) + 0.25j d(n-5)), d random 64-QAM decisions, the
// coefficients must converge to b2 = 0.5 and b5 = 0.25j and the error
// become small. The output must come two clocks after the input.
`include "tb/tb_check.svh"
module tb_fbe;
  import qam_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, upd_en = 1, err_valid = 0, out_valid;
  cplx_t d, err, z;
  int checks = 0, failures = 0;
  cplx_t hist [$];

  fbe #(.MU_SH(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int big = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      automatic cplx_t t = '0, yv;
      @(negedge clk);
      d.re = 12'((int'($urandom_range(0, 7)) * 2 - 7) * 128);
      d.im = 12'((int'($urandom_range(0, 7)) * 2 - 7) * 128);
      in_valid = 1;
      @(negedge clk); in_valid = 0;
      // line now holds d(n) at [0]; z uses it
      hist.push_front(d);
      @(negedge clk);
      `CHECK(out_valid, "output two clocks after input")
      if (i < 1) `CHECK(z == '0, "zero after reset")
      yv.re = -z.re; yv.im = -z.im;
      if (hist.size() > 5) begin
        t.re = 12'(-((int'(hist[2].re) >>> 1) - (int'(hist[5].im) >>> 2)));
        t.im = 12'(-((int'(hist[2].im) >>> 1) + (int'(hist[5].re) >>> 2)));
      end
      err.re = sat_dw(48'(t.re) - 48'(yv.re));
      err.im = sat_dw(48'(t.im) - 48'(yv.im));
      err_valid = 1;
      @(negedge clk); err_valid = 0;
      if (i > 3000 && (int'(err.re) > 60 || int'(err.re) < -60)) big++;
    end
    $display("INFO b2=%0d b5.im=%0d large=%0d", dut.b_re[2][23 -: 16], dut.b_im[5][23 -: 16], big);
    `CHECK(big < 20, "error small after training")
    `CHECK(dut.b_re[2][23 -: 16] > 16'sd1900 && dut.b_re[2][23 -: 16] < 16'sd2200, "b2 = 0.5")
    `CHECK(dut.b_im[5][23 -: 16] > 16'sd900 && dut.b_im[5][23 -: 16] < 16'sd1150, "b5 = 0.25j")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
