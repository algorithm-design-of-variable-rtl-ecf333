// tb_ffe_dual_mode: drives random complex pairs, one per symbol.
//  1. Frozen coefficients (reset: 1.0 at tap 4): the pipeline adds D = 3
//     symbols, so in symbol-spaced mode the output must be x_e of seven
//     symbols earlier, in T/2 mode x_o of seven symbols earlier (tap 4 is in
//     the odd half), exactly, two clocks after the input.
//  2. Adaptation: the error d - y is returned for a wanted output d that
//     needs taps the reset state does not use. In symbol-spaced mode d is
//     x_e of 19 symbols earlier (tap 16, reachable only through the odd line
//     feeding the even line); in T/2 mode d is 0.5 x_e(n-6) + 0.25j x_o(n-5)
//     (taps 15 and 2, in different pipeline modules). After training the
//     error must be small and the taps near their values.
`include "tb/tb_check.svh"
module tb_ffe_dual_mode;
  import qam_pkg::*;
  logic clk = 0, rst_n = 0, fse = 0, in_valid = 0, upd_en = 0, err_valid = 0, out_valid;
  cplx_t x_e, x_o, err, y;
  int checks = 0, failures = 0;
  cplx_t he [$], ho [$];   // history, [0] newest

  ffe_dual_mode #(.MU_SH(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cplx_t rnd();
    cplx_t c;
    c.re = 12'($urandom_range(0, 2000) - 1000);
    c.im = 12'($urandom_range(0, 2000) - 1000);
    return c;
  endfunction

  // one symbol: returns the equalizer output
  task automatic sym(output cplx_t yo);
    @(negedge clk);
    x_e = rnd(); x_o = rnd();
    he.push_front(x_e); ho.push_front(x_o);
    in_valid = 1;
    @(negedge clk); in_valid = 0;
    @(negedge clk);
    `CHECK(out_valid, "output two clocks after input")
    yo = y;
  endtask

  task automatic give_err(cplx_t d, cplx_t yo);
    err.re = sat_dw(48'(d.re) - 48'(yo.re));
    err.im = sat_dw(48'(d.im) - 48'(yo.im));
    err_valid = 1;
    @(negedge clk); err_valid = 0;
  endtask

  task automatic restart(logic m);
    @(negedge clk); rst_n = 0; fse = m; he = {}; ho = {};
    @(negedge clk); rst_n = 1;
  endtask

  initial begin
    cplx_t yo, d;
    int big;
    repeat (2) @(posedge clk);
    for (int m = 0; m < 2; m++) begin
      restart(m[0]);
      upd_en = 0;
      for (int i = 0; i < 40; i++) begin
        sym(yo);
        if (i >= 7) `CHECK(yo == (m ? ho[7] : he[7]), "frozen tap 4 path, D = 3 later")
      end
    end
    // adaptation
    for (int m = 0; m < 2; m++) begin
      restart(m[0]);
      upd_en = 1;
      big = 0;
      for (int i = 0; i < 4000; i++) begin
        sym(yo);
        if (m == 0) d = (he.size() > 19) ? he[19] : '0;
        else begin
          d = '0;
          if (he.size() > 6) begin
            d.re = 12'((int'(he[6].re) >>> 1) - (int'(ho[5].im) >>> 2));
            d.im = 12'((int'(he[6].im) >>> 1) + (int'(ho[5].re) >>> 2));
          end
        end
        give_err(d, yo);
        if (i > 3000) begin
          automatic int er = int'(d.re) - int'(yo.re);
          if (er > 60 || er < -60) big++;
        end
      end
      $display("INFO mode %0d: %0d large errors in the last 1000 symbols", m, big);
      `CHECK(big < 20, "trained error small")
      if (m == 0) `CHECK(dut.c_re[16][23 -: 16] > 16'sd3900 && dut.c_re[4][23 -: 16] < 16'sd200, "tap 16 near 1, tap 4 near 0")
      else `CHECK(dut.c_re[15][23 -: 16] > 16'sd1900 && dut.c_re[15][23 -: 16] < 16'sd2200 &&
                  dut.c_im[2][23 -: 16] > 16'sd900 && dut.c_im[2][23 -: 16] < 16'sd1150, "T/2 taps found")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
