// tb_lead_lag_filter: drives random errors and checks every output against
// a model of out = e*2^KP + integ, integ += e*2^KI (with saturation), then
// checks that a constant error ramps the integral path and that clear works.
`include "tb/tb_check.svh"
module tb_lead_lag_filter;
  localparam int KP = 4, KI = 1, OW = 24;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, out_valid;
  logic signed [15:0] e = 0;
  logic signed [OW-1:0] out, integ;
  int checks = 0, failures = 0;
  longint m_int = 0, m_out = 0;

  lead_lag_filter #(.IN_W(16), .OUT_W(OW), .KP_SH(KP), .KI_SH(KI)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sat(longint v);
    return v > (2**(OW-1) - 1) ? (2**(OW-1) - 1) : v < -(2**(OW-1)) ? -(2**(OW-1)) : v;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = ($urandom % 3) != 0;
      e = (i < 2000) ? 16'($urandom) : 16'sd30000;
      if (in_valid) begin
        m_out = sat(longint'(e) * (2**KP) + m_int);
        m_int = sat(m_int + longint'(e) * (2**KI));
      end
      @(posedge clk); #1;
      `CHECK(longint'(out) == m_out && longint'(integ) == m_int, "output and integrator")
    end
    `CHECK(integ == 24'sh7FFFFF, "integrator saturates")
    @(negedge clk); clear = 1; in_valid = 0;
    @(negedge clk); clear = 0;
    `CHECK(integ == 0 && out == 0, "clear")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
