// tb_timing_nco: checks the 40-bit phase accumulator exactly against a model,
// and that the strobe rate equals w / 2^40 of the input rate (the gated
// clock at 2 f_T) for a step word near 0.8.
`include "tb/tb_check.svh"
module tb_timing_nco;
  logic clk = 0, rst_n = 0, in_valid = 0, strobe;
  logic [39:0] w, u;
  int checks = 0, failures = 0, nstb = 0, nin = 0;
  logic [40:0] m = 0;
  logic m_stb;

  timing_nco dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w = 40'(64'd879609302220);   // 0.8 * 2^40
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 10000; i++) begin
      @(negedge clk);
      in_valid = (i % 2) == 0;     // one input every two clocks (f_s/2)
      m_stb = 0;
      if (in_valid) begin
        m = {1'b0, m[39:0]} + {1'b0, w};
        m_stb = m[40];
        nin++;
      end
      @(posedge clk); #1;
      `CHECK(u == m[39:0] && strobe == m_stb, "phase and strobe")
      if (strobe) nstb++;
    end
    // 5000 inputs * 0.8 = 4000 strobes (+-1)
    `CHECK(nstb >= 3999 && nstb <= 4001, "strobe rate 2 f_T")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
