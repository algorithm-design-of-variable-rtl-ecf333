// agc: automatic gain control for the RF and IF analog gain stages.
//
// The loop measures the magnitude of every ADC sample and integrates the
// difference from a target level, so that the mean absolute ADC level settles
// at TARGET. The integrator drives the IF gain word. The RF gain word is
// stepped only when the IF gain has run into one of its limits ("delayed
// take-over"): a weak signal first raises the IF gain, and once that is at
// full scale the RF gain is raised instead, and the opposite for a strong
// signal. Raising a gain word raises that stage's gain.
//
// That the AGC drives two gain outputs so the ADC input sits in its optimal
// range is the receiver's specification; the magnitude detector, the
// integrator, the take-over rule, the widths and the gains are this design's
// own choices.
//
// Interface: adc_in is sampled when in_valid is high. rf_gain and if_gain are
// registered unsigned words, reset to mid-scale. rf_step pulses when the RF
// gain moved. Timing: one update per valid sample, gains change one clock
// after the sample.
module agc #(
  parameter int DW      = 12,     // ADC sample width
  parameter int GW      = 12,     // gain word width
  parameter int TARGET  = 512,    // wanted mean |adc_in|
  parameter int K_SH    = 6,      // integrator gain = 2^-K_SH gain LSB per level LSB
  parameter int RF_STEP = 16,     // RF gain step
  parameter int RF_HOLD = 1024    // samples between RF steps
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] adc_in,
  output logic        [GW-1:0] rf_gain,
  output logic        [GW-1:0] if_gain,
  output logic                 rf_step
);
  localparam int AW = GW + K_SH;                 // integrator width
  localparam logic [AW-1:0] ACC_MAX = '1;
  localparam logic [GW-1:0] G_MAX   = '1;

  logic [AW-1:0]        acc;
  logic [DW-1:0]        mag;
  logic signed [AW+1:0] err, acc_next;
  logic [$clog2(RF_HOLD+1)-1:0] hold;

  always_comb begin
    mag      = adc_in[DW-1] ? DW'(-adc_in) : DW'(adc_in);
    err      = (AW+2)'(TARGET) - (AW+2)'(mag);
    acc_next = $signed({2'b00, acc}) + err;
  end

  assign if_gain = acc[AW-1 -: GW];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= {1'b1, {(AW-1){1'b0}}};
      rf_gain <= {1'b1, {(GW-1){1'b0}}};
      rf_step <= 1'b0;
      hold    <= '0;
    end else begin
      rf_step <= 1'b0;
      if (in_valid) begin
        if (hold != 0) hold <= hold - 1'b1;
        if (acc_next < 0) begin
          acc <= '0;
          // IF gain at its floor and still too strong: lower RF gain
          if (rf_gain >= GW'(RF_STEP) && hold == 0) begin
            rf_gain <= rf_gain - GW'(RF_STEP);
            rf_step <= 1'b1;
            hold    <= RF_HOLD[$bits(hold)-1:0];
          end
        end else if (acc_next > $signed({2'b00, ACC_MAX})) begin
          acc <= ACC_MAX;
          // IF gain at full scale and still too weak: raise RF gain
          if (rf_gain <= G_MAX - GW'(RF_STEP) && hold == 0) begin
            rf_gain <= rf_gain + GW'(RF_STEP);
            rf_step <= 1'b1;
            hold    <= RF_HOLD[$bits(hold)-1:0];
          end
        end else begin
          acc <= acc_next[AW-1:0];
        end
      end
    end
  end
endmodule
