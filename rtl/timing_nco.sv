// timing_nco: numerically controlled oscillator of the timing loop.
//
// A 40-bit phase register is advanced by the 40-bit unsigned step word w
// once per input sample (rate f_s/2). The 41-bit sum's top bit is the
// overflow: when the accumulated phase passes one, an output sample is due.
// That bit, registered, is the enable of the "gated clock" at 2 f_T, and the
// register's contents are the phase u from which the interpolator's
// fractional interval is derived. With w = 2^40 * 2 f_T / (f_s/2) the
// strobe rate is 2 f_T.
//
// The 40-bit input and register, the 41-bit sum and the use of its top bit
// for the gated clock follow the receiver's NCO; the clock is realised as a
// clock enable (strobe) rather than a gated clock, which is this design's
// choice, as is the reset value of the phase.
//
// Interface: in_valid advances the phase. strobe and u are registered and
// valid one clock after the in_valid that overflowed; u is the phase left
// after the overflow, in units of 2^-40.
module timing_nco #(
  parameter int PW = 40
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [PW-1:0] w,
  output logic          strobe,
  output logic [PW-1:0] u
);
  logic [PW:0] sum;
  always_comb sum = {1'b0, u} + {1'b0, w};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      u      <= '0;
      strobe <= 1'b0;
    end else begin
      strobe <= in_valid && sum[PW];
      if (in_valid) u <= sum[PW-1:0];
    end
  end
endmodule
