// prelim_demod: preliminary demodulation by a quarter of the sample rate.
//
// With a 36.15 MHz IF sampled at 28.92 MHz the signal aliases to f_s/4, so it
// is brought to baseband by multiplying the ADC samples by cos(pi n/2) and
// sin(pi n/2). Both sequences only take the values 0, +1 and -1, so no
// multiplier is needed: a 2-bit sample counter selects x, 0 or -x for each
// of I and Q:
//   n mod 4 : 0   1   2   3
//   I       : x   0  -x   0
//   Q       : 0  -x   0   x     (Q = -x sin(pi n/2), a down-conversion)
// The translation by f_s/4 with these two sequences follows the receiver's
// specification; the sign of Q (down rather than up conversion), the
// saturation of -(-2^(DW-1)) and the one-cycle register are this design's
// choices.
//
// Interface: one sample per clock with in_valid; out (a complex sample) and
// out_valid follow one clock later.
module prelim_demod
  import qam_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] adc_in,
  output logic                 out_valid,
  output cplx_t                out
);
  logic [1:0]           n;
  logic signed [DW-1:0] neg;

  always_comb neg = sat_dw(-48'(adc_in));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n         <= '0;
      out_valid <= 1'b0;
      out       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        n <= n + 2'd1;
        unique case (n)
          2'd0: begin out.re <= adc_in; out.im <= '0;     end
          2'd1: begin out.re <= '0;     out.im <= neg;    end
          2'd2: begin out.re <= neg;    out.im <= '0;     end
          2'd3: begin out.re <= '0;     out.im <= adc_in; end
        endcase
      end
    end
  end
endmodule
