// tb_slicer: sweeps both rails over the whole 12-bit range and checks the
// decision against the nearest 64-QAM level (2i-7)*128 found by search.
`include "tb/tb_check.svh"
module tb_slicer;
  import qam_pkg::*;
  cplx_t x, dec;
  logic [2:0] idx_re, idx_im;
  logic signed [4:0] lvl_re, lvl_im;
  int checks = 0, failures = 0;

  slicer dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int nearest(int v);
    int best = 0, bd = 1 << 30;
    for (int i = 0; i < 8; i++) begin
      automatic int l = (2 * i - 7) * 128;
      automatic int d = (v > l) ? v - l : l - v;
      if (d <= bd) begin bd = d; best = i; end  // ties go to the upper level
    end
    return best;
  endfunction

  initial begin
    for (int v = -2048; v < 2048; v += 1) begin
      x.re = 12'(v); x.im = 12'(-v - 1);
      #1;
      `CHECK(int'(idx_re) == nearest(v), "re index")
      `CHECK(int'(idx_im) == nearest(-v - 1), "im index")
      `CHECK(int'(dec.re) == (2 * int'(idx_re) - 7) * 128 && int'(lvl_im) == 2 * int'(idx_im) - 7, "levels")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
