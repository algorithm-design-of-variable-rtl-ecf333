// tb_eq_error: checks the LMS error d - y and the CMA error
// y (58 - |y|^2/128^2) / 32 on random inputs, computed here in real
// arithmetic, allowing the rounding of the fixed-point version.
`include "tb/tb_check.svh"
module tb_eq_error;
  import qam_pkg::*;
  logic cma;
  cplx_t y, d, e;
  int checks = 0, failures = 0;

  eq_error dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sat(real v);
    return v > 2047.0 ? 2047 : v < -2048.0 ? -2048 : int'($floor(v));
  endfunction

  initial begin
    for (int i = 0; i < 500; i++) begin
      y.re = 12'($urandom); y.im = 12'($urandom);
      d.re = 12'($urandom); d.im = 12'($urandom);
      cma = 0; #1;
      `CHECK(int'(e.re) == sat(real'(int'(d.re) - int'(y.re))) && int'(e.im) == sat(real'(int'(d.im) - int'(y.im))), "LMS error")
      cma = 1; #1;
      begin
        automatic real m = (real'(int'(y.re))**2 + real'(int'(y.im))**2) / 16384.0;
        automatic real er = real'(int'(y.re)) * (58.0 - m) / 32.0;
        automatic int  ref_re = sat(er);
        automatic int  dif = int'(e.re) - ref_re;
        `CHECK(dif >= -2 && dif <= 2, "CMA error")
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
