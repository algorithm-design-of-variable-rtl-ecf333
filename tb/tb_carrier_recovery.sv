// tb_carrier_recovery:
//  1. Phase detector: for random x and decision levels y the registered pd
//     must equal trunc(Im(x conj y) / |y|^2).
//  2. Closed loop: 64-QAM symbols rotated by a phase offset of 25 degrees
//     plus a frequency offset of 0.02 degrees per symbol are de-rotated with
//     the loop's e^{-j theta}, sliced here, and fed back. First in
//     four-corners mode (only corner points update), then decision directed.
//     At the end the de-rotated points must lie within 0.4 level of their
//     decisions and the integral path must hold the frequency offset.
`include "tb/tb_check.svh"
module tb_carrier_recovery;
  import qam_pkg::*;
  logic clk = 0, rst_n = 0, four_corners = 0, in_valid = 0, pd_valid;
  cplx_t x, rot_neg, rot_pos;
  logic signed [4:0] lvl_re, lvl_im;
  logic [23:0] theta;
  logic signed [23:0] lf_out;
  logic signed [15:0] pd;
  int checks = 0, failures = 0;
  real pi = 3.14159265358979;

  carrier_recovery dut (.*);
  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int lvl(real v);   // nearest odd level of v/256
    int i = int'($floor((v + 1024.0) / 256.0));
    i = i < 0 ? 0 : i > 7 ? 7 : i;
    return 2 * i - 7;
  endfunction

  initial begin
    int bad = 0, n = 0;
    real ph0 = 25.0 * pi / 180.0, dw = 0.02 * pi / 180.0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // 1. phase detector
    for (int i = 0; i < 200; i++) begin
      automatic int yr = int'($urandom_range(0, 7)) * 2 - 7, yi = int'($urandom_range(0, 7)) * 2 - 7;
      automatic int xr = int'($urandom_range(0, 4000)) - 2000, xi = int'($urandom_range(0, 4000)) - 2000;
      automatic int num = xi * yr - xr * yi, den = yr * yr + yi * yi;
      @(negedge clk);
      x.re = 12'(xr); x.im = 12'(xi); lvl_re = 5'(yr); lvl_im = 5'(yi); in_valid = 1;
      @(negedge clk); in_valid = 0;
      `CHECK(pd_valid && int'(pd) == num / den, "Im[x/y]")
    end
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
    // 2. closed loop
    for (int i = 0; i < 12000; i++) begin
      automatic int ar = int'($urandom_range(0, 7)) * 2 - 7, ai = int'($urandom_range(0, 7)) * 2 - 7;
      automatic real phi = ph0 + dw * real'(i);
      automatic real zr = 128.0 * (ar * $cos(phi) - ai * $sin(phi));
      automatic real zi = 128.0 * (ar * $sin(phi) + ai * $cos(phi));
      automatic real cr = real'(int'(rot_neg.re)) / 2048.0, ci = real'(int'(rot_neg.im)) / 2048.0;
      automatic real xr = zr * cr - zi * ci, xi = zr * ci + zi * cr;
      four_corners = (i < 6000);
      @(negedge clk);
      x.re = sat_dw(48'(int'(xr))); x.im = sat_dw(48'(int'(xi)));
      lvl_re = 5'(lvl(xr)); lvl_im = 5'(lvl(xi));
      in_valid = 1;
      @(negedge clk); in_valid = 0;
      repeat (4) @(negedge clk);
      if (i % 1000 == 0) $display("INFO i=%0d theta=%0d deg integ=%0d", i, longint'(theta) * 360 / 2**24, dut.u_lf.integ);
      if (i >= 11000) begin
        automatic real er = xr - 128.0 * ar, ei = xi - 128.0 * ai;
        n++;
        if (er * er + ei * ei > (0.4 * 128.0) ** 2) bad++;
      end
    end
    $display("INFO %0d of %0d points off, integ %0d", bad, n, dut.u_lf.integ);
    `CHECK(bad < n / 100, "locked: de-rotated points on their decisions")
    // 0.02 deg/symbol = 2^24 * 0.02/360 = 932 phase units per symbol
    `CHECK(dut.u_lf.integ > 700 && dut.u_lf.integ < 1200, "integral path holds the frequency offset")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
