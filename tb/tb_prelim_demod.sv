// tb_prelim_demod: feeds random samples and checks I = x cos(pi n/2) and
// Q = -x sin(pi n/2) sample by sample, including the saturated negation of
// the most negative value.
`include "tb/tb_check.svh"
module tb_prelim_demod;
  import qam_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [11:0] adc_in = 0;
  cplx_t out;
  int checks = 0, failures = 0;
  int n = 0;
  logic signed [11:0] xs [$];

  prelim_demod dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sat(int v);
    return v > 2047 ? 2047 : v < -2048 ? -2048 : v;
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    automatic int x = xs.pop_front();
    automatic int ci = (n % 4 == 0) ? 1 : (n % 4 == 2) ? -1 : 0;
    automatic int si = (n % 4 == 1) ? 1 : (n % 4 == 3) ? -1 : 0;
    `CHECK(int'(out.re) == sat(x * ci) && int'(out.im) == sat(-x * si), "I/Q value")
    n++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      in_valid = 1;
      adc_in = (i == 5 || i == 6) ? -12'sd2048 : 12'($urandom);
      xs.push_back(adc_in);
    end
    @(negedge clk); in_valid = 0;
    repeat (3) @(posedge clk);
    `CHECK(n == 200, "one output per input")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
