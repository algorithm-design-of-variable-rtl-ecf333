// tb_mode_ctrl: counts symbols through the acquisition phases and checks
// that each phase lasts its prescribed number of symbols and drives the
// right controls (small phase lengths are used to keep the run short).
`include "tb/tb_check.svh"
module tb_mode_ctrl;
  import qam_pkg::*;
  logic clk = 0, rst_n = 0, sym_valid = 0;
  eq_mode_e mode;
  logic eq_upd_en, cr_en, cma, four_corners, p2;
  int checks = 0, failures = 0;

  mode_ctrl #(.N_TR(5), .N_CMA(7), .N_LMS(3)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic syms(int n);
    repeat (n) begin
      @(negedge clk); sym_valid = 1;
      @(negedge clk); sym_valid = 0;
      repeat (2) @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    `CHECK(mode == MODE_ACQ && !eq_upd_en && !cr_en, "acquisition")
    syms(4);
    `CHECK(mode == MODE_ACQ, "acquisition lasts N_TR")
    syms(1);
    `CHECK(mode == MODE_CMA && cma && four_corners && !p2 && eq_upd_en, "CMA phase")
    syms(6);
    `CHECK(mode == MODE_CMA, "CMA lasts N_CMA")
    syms(1);
    `CHECK(mode == MODE_LMS && !cma && !four_corners && !p2, "LMS on p1")
    syms(3);
    `CHECK(mode == MODE_DFE && p2 && !cma && cr_en, "DFE on p2")
    syms(20);
    `CHECK(mode == MODE_DFE, "DFE stays")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
