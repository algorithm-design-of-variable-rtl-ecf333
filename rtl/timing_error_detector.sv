// timing_error_detector: band-edge timing error detector.
//
// The interpolated signal (two samples per symbol, baseband, f0 = 0) passes
// through two leaky complex band-pass filters centred on the band edges
// f1 = -f_T/2 and f2 = +f_T/2. At two samples per symbol these centre
// frequencies are -1/4 and +1/4 of the sample rate, so the rotation of the
// one-pole filters is a multiplication by -j or +j, which is a swap and a
// negation:
//   s1[n] = x[n] + lambda * (-j) * s1[n-1]
//   s2[n] = x[n] + lambda * (+j) * s2[n-1],   lambda = 1 - 2^-LEAK_SH.
// The product p = Im(conj(s1) s2) = s1.re*s2.im - s1.im*s2.re is formed on
// every sample. Its timing term changes sign from one half-symbol sample to
// the next while its self-noise bias does not, so the error is taken once
// per symbol (every second input) as the difference of the last two
// products, e = (p[n] - p[n-1]) / 2^(E_SH+1). Sampling later than the
// symbol centre gives a negative error.
//
// The two leaky complex band-pass filters at f0 -+ f_T/2 and the error
// Im(s1* s2) follow the receiver's specification; the one-pole form of the
// filters, the leak, the scaling and the two-sample difference (which removes a bias
// a single sample would have) are this design's choices.
//
// Interface: in_valid/in at two samples per symbol. err_valid pulses, with
// err registered, one clock after every second input.
module timing_error_detector
  import qam_pkg::*;
#(
  parameter int LEAK_SH = 3,
  parameter int SW      = DW + 4,   // filter state width
  parameter int EW      = 16,       // error width
  parameter int E_SH    = 10
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  cplx_t                in,
  output logic                 err_valid,
  output logic signed [EW-1:0] err
);
  logic signed [SW-1:0] s1r, s1i, s2r, s2i;
  logic signed [SW-1:0] n1r, n1i, n2r, n2i;
  logic signed [SW-1:0] l1r, l1i, l2r, l2i;
  logic signed [2*SW:0] prod;
  logic                 phase;
  logic signed [2*SW:0] prod_prev;
  logic signed [2*SW+1:0] diff;

  function automatic logic signed [SW-1:0] leak(input logic signed [SW-1:0] v);
    return v - (v >>> LEAK_SH);
  endfunction

  always_comb begin
    l1r = leak(s1r); l1i = leak(s1i);
    l2r = leak(s2r); l2i = leak(s2i);
    // -j * (a + jb) = b - ja ;  +j * (a + jb) = -b + ja
    n1r = SW'(in.re) + l1i;
    n1i = SW'(in.im) - l1r;
    n2r = SW'(in.re) - l2i;
    n2i = SW'(in.im) + l2r;
    prod = (2*SW+1)'(n1r) * (2*SW+1)'(n2i) - (2*SW+1)'(n1i) * (2*SW+1)'(n2r);
    diff = ((2*SW+2)'(prod) - (2*SW+2)'(prod_prev)) >>> (E_SH + 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {s1r, s1i, s2r, s2i} <= '0;
      prod_prev <= '0;
      phase     <= 1'b0;
      err_valid <= 1'b0;
      err       <= '0;
    end else begin
      err_valid <= 1'b0;
      if (in_valid) begin
        s1r <= n1r; s1i <= n1i;
        s2r <= n2r; s2i <= n2i;
        phase <= ~phase;
        prod_prev <= prod;
        if (phase) begin
          err_valid <= 1'b1;
          if (diff > (2*SW+2)'(2**(EW-1)-1))      err <= EW'(2**(EW-1)-1);
          else if (diff < -(2*SW+2)'(2**(EW-1)))  err <= EW'(-(2**(EW-1)));
          else                                    err <= EW'(diff);
        end
      end
    end
  end
endmodule
