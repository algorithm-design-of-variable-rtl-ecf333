// mode_ctrl: sequencer of the receiver's joint acquisition.
//
// The loops depend on each other, so they are enabled in order, each phase
// lasting a prescribed number of symbols:
//   MODE_ACQ  (N_TR symbols)  timing loop acquires; equalizer and carrier
//                             loop frozen.
//   MODE_CMA  (N_CMA symbols) blind start: CMA coefficient update, carrier
//                             loop in four-corners (QPSK) mode, feedback
//                             path p1 (linear, soft equalizer output fed
//                             back).
//   MODE_LMS  (N_LMS symbols) decision-directed LMS update, still path p1.
//   MODE_DFE  (stays)         path p2: the re-rotated decision is fed back
//                             (true decision feedback), everything
//                             decision directed.
// The order of the phases, the four-corners start-up and the p1/p2 switch
// follow the receiver's joint operation; the symbol counts are not given
// there and are this design's choice (the carrier loop output in the
// original settles within a few tens of thousands of samples).
//
// Interface: sym_valid counts symbols; all outputs are registered and change
// on the clock after the symbol that ends a phase.
module mode_ctrl
  import qam_pkg::*;
#(
  parameter int N_TR  = 2048,
  parameter int N_CMA = 16384,
  parameter int N_LMS = 8192
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     sym_valid,
  output eq_mode_e mode,
  output logic     eq_upd_en,     // equalizer coefficients adapt
  output logic     cr_en,         // carrier loop runs
  output logic     cma,           // CMA error (else DD-LMS)
  output logic     four_corners,  // QPSK coarse carrier decisions
  output logic     p2             // decision feedback path p2 (else p1)
);
  logic [31:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode <= MODE_ACQ;
      cnt  <= '0;
    end else if (sym_valid && mode != MODE_DFE) begin
      cnt <= cnt + 32'd1;
      unique case (mode)
        MODE_ACQ: if (cnt == 32'(N_TR - 1))  begin mode <= MODE_CMA; cnt <= '0; end
        MODE_CMA: if (cnt == 32'(N_CMA - 1)) begin mode <= MODE_LMS; cnt <= '0; end
        MODE_LMS: if (cnt == 32'(N_LMS - 1)) begin mode <= MODE_DFE; cnt <= '0; end
        default: ;
      endcase
    end
  end

  always_comb begin
    eq_upd_en    = (mode != MODE_ACQ);
    cr_en        = (mode != MODE_ACQ);
    cma          = (mode == MODE_CMA);
    four_corners = (mode == MODE_CMA);
    p2           = (mode == MODE_DFE);
  end
endmodule
