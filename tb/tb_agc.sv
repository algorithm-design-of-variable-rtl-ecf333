// tb_agc: checks the AGC loop. A weak constant-magnitude input must raise
// the IF gain until it saturates and then step the RF gain up; a strong one
// must do the opposite. Exact values of the first steps are worked out from
// the loop equation acc += TARGET - |x| (integrator 18 bits, IF gain its top
// 12 bits, both starting at mid-scale). RF steps must be at least 1024
// samples apart, and the IF gain must stay at its limit across a step.
`include "tb/tb_check.svh"
module tb_agc;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [11:0] adc_in = 0;
  logic [11:0] rf_gain, if_gain;
  logic rf_step;
  int checks = 0, failures = 0, rf_up = 0, rf_dn = 0;
  logic [11:0] rf0;
  int last_step = -1;

  agc dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    `CHECK(if_gain == 12'h800 && rf_gain == 12'h800, "reset mid-scale")
    // 64 samples of alternating +-256: error +256 each, acc += 256*64 = 16384 -> if_gain + 256
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); in_valid = 1; adc_in = (i % 2) ? -12'sd256 : 12'sd256;
    end
    @(negedge clk); in_valid = 0;
    `CHECK(if_gain == 12'h900, "IF gain after 64 weak samples")
    `CHECK(rf_gain == 12'h800, "RF gain untouched before IF saturation")
    // keep it weak until the RF gain steps up
    rf0 = rf_gain;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk); in_valid = 1; adc_in = 12'sd10;
      if (rf_step) begin
        rf_up++;
        `CHECK(last_step < 0 || i - last_step >= 1024, "RF step spacing")
        `CHECK(if_gain == 12'hFFF, "IF gain stays at its limit")
        last_step = i;
      end
    end
    `CHECK(rf_up > 0 && rf_gain > rf0, "RF gain raised after IF saturation")
    // strong signal: gains come down
    for (int i = 0; i < 40000; i++) begin
      @(negedge clk); in_valid = 1; adc_in = (i % 2) ? -12'sd2000 : 12'sd2000;
      if (rf_step) rf_dn++;
    end
    `CHECK(rf_dn > 0 && rf_gain < rf0 + 12'd16 * 12'(rf_up), "RF gain lowered for strong input")
    // at a level equal to the target the integrator holds
    @(negedge clk); in_valid = 1; adc_in = 12'sd512;
    @(negedge clk); rf0 = if_gain;
    repeat (100) @(negedge clk);
    `CHECK(if_gain == rf0, "loop holds at the target level")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
