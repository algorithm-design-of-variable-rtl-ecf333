// lead_lag_filter: proportional-plus-integral (lead-lag) loop filter.
//
// Each valid error sample e updates
//   integ <= integ + e * 2^KI_SH          (integral path: frequency error)
//   out   <= e * 2^KP_SH + integ          (proportional path: phase error)
// with the integrator saturating at its OUT_W-bit range. Gains are powers of
// two so the paths are shifts only. The two-path structure, with the
// proportional path tracking the phase error and the integral path the
// frequency error, follows the receiver's specification (it also matches the
// k1/k2 paths of the carrier loop). Using power-of-two gains and the widths
// are this design's choices.
//
// Interface: e/in_valid in; out/out_valid registered one clock later. clear
// resets the integrator and output synchronously.
module lead_lag_filter #(
  parameter int IN_W  = 16,
  parameter int OUT_W = 24,
  parameter int KP_SH = 4,
  parameter int KI_SH = 0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  e,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out,
  output logic signed [OUT_W-1:0] integ
);
  localparam logic signed [OUT_W+1:0] MAXV = (OUT_W+2)'(2) ** (OUT_W-1) - 1;
  localparam logic signed [OUT_W+1:0] MINV = -((OUT_W+2)'(2) ** (OUT_W-1));

  logic signed [OUT_W+1:0] p, i_next, o_next;

  function automatic logic signed [OUT_W-1:0] sat(input logic signed [OUT_W+1:0] v);
    if (v > MAXV)      return MAXV[OUT_W-1:0];
    else if (v < MINV) return MINV[OUT_W-1:0];
    else               return v[OUT_W-1:0];
  endfunction

  always_comb begin
    p      = (OUT_W+2)'(e) <<< KP_SH;
    i_next = (OUT_W+2)'(integ) + ((OUT_W+2)'(e) <<< KI_SH);
    o_next = p + (OUT_W+2)'(integ);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ     <= '0;
      out       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (clear) begin
        integ <= '0;
        out   <= '0;
      end else if (in_valid) begin
        integ <= sat(i_next);
        out   <= sat(o_next);
      end
    end
  end
endmodule
