// recirc_decimator: recirculating half-band decimator with ratio 2, 4 or 8.
//
// Three cascaded decimate-by-two stages share one half-band filter core per
// rail (I and Q). Each stage keeps its own 19-sample register bank; the
// core is switched between the banks by three mutually exclusive stage
// enables derived from a count of accepted input samples c:
//   stage 1 (C1) computes when c is odd          (every 2nd input)
//   stage 2 (C2) computes when c mod 4 == 2      (every 4th input)
//   stage 3 (C3) computes when c mod 8 == 4      (every 8th input)
// so the core is never asked for two results in one input period. A stage's
// result is shifted into the next stage's bank, and the output register
// takes the result of the stage chosen by sel (the 3:1 multiplexer), giving
// output rates f_in/2, f_in/4 or f_in/8. With the 28.92 MHz ADC this spans
// symbol rates from 875 kBd to 7 MBd at two samples per symbol or more.
//
// The shared core, the three exclusive enables, the register banks, the
// 2/4/8 ratios and the 3:1 output multiplexer follow the receiver's
// architecture. Where the original stores per-stage partial sums in a
// transposed structure, this version stores per-stage input samples and
// computes each output in direct form, which needs the same single core.
// The slot schedule above is this design's choice.
//
// Interface: in/in_valid at most one complex sample per clock; sel (0,1,2 for
// ratio 2,4,8, 3 behaves as 2) should be changed only in reset. out_valid
// pulses one clock after the input that completes an output sample.
module recirc_decimator
  import qam_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [1:0]  sel,
  input  logic        in_valid,
  input  cplx_t       in,
  output logic        out_valid,
  output cplx_t       out
);
  localparam int NT = 19;

  cplx_t       bank [3][NT];   // register banks, [stage][0 = newest]
  logic [2:0]  c;              // input sample count
  logic [2:0]  en;             // exclusive stage enables C1..C3
  logic [1:0]  stg;
  logic signed [DW-1:0] core_re_in [NT];
  logic signed [DW-1:0] core_im_in [NT];
  logic signed [DW-1:0] core_re, core_im;

  always_comb begin
    en[0] = in_valid && c[0];
    en[1] = in_valid && (c[1:0] == 2'b10);
    en[2] = in_valid && (c == 3'b100);
    stg   = en[2] ? 2'd2 : en[1] ? 2'd1 : 2'd0;
    for (int k = 0; k < NT; k++) begin
      core_re_in[k] = bank[stg][k].re;
      core_im_in[k] = bank[stg][k].im;
    end
  end

  // one core per rail, shared by the three stages
  halfband_csd u_core_re (.x(core_re_in), .y(core_re));
  halfband_csd u_core_im (.x(core_im_in), .y(core_im));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c         <= '0;
      bank      <= '{default: '0};
      out_valid <= 1'b0;
      out       <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        c <= c + 3'd1;
        // stage 1 bank takes every input sample
        bank[0][0] <= in;
        for (int k = 1; k < NT; k++) bank[0][k] <= bank[0][k-1];
        for (int s = 0; s < 3; s++) begin
          if (en[s]) begin
            if (s < 2) begin
              bank[s+1][0] <= '{re: core_re, im: core_im};
              for (int k = 1; k < NT; k++) bank[s+1][k] <= bank[s+1][k-1];
            end
            if (int'(sel) == s || (sel == 2'd3 && s == 0)) begin
              out_valid <= 1'b1;
              out       <= '{re: core_re, im: core_im};
            end
          end
        end
      end
    end
  end

  // the stage enables must never overlap: one core serves all stages
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(en));
endmodule
