// tb_recirc_decimator: for each ratio 2, 4 and 8 checks
//  - the output rate (one output per 2, 4 or 8 inputs),
//  - the exact DC gain of one (coefficients sum to 1024),
//  - for ratio 2, the impulse response: an impulse of 1024 must come out as
//    either the ten odd-distance taps 1 -9 31 -84 317 317 -84 31 -9 1 or
//    the centre tap 512 alone, depending on its phase,
//  - for ratio 2, a tone at half the input rate is cancelled exactly,
//  - for ratios 2, 4 and 8, random input against a cascade of ideal
//    half-band decimators modelled here (same integer coefficients, same
//    truncation); the phase each stage keeps and the output lag are
//    searched, and one choice must match every output exactly.
`include "tb/tb_check.svh"
module tb_recirc_decimator;
  import qam_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [1:0] sel = 0;
  cplx_t in, out;
  int checks = 0, failures = 0, nout = 0;
  int ys [$];

  recirc_decimator dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin nout++; ys.push_back(int'(out.re)); end

  int hb [19] = '{1, 0, -9, 0, 31, 0, -84, 0, 317, 512, 317, 0, -84, 0, 31, 0, -9, 0, 1};
  int xin [$];

  // one half-band decimation by 2 keeping the outputs at positions n%2 == ph
  function automatic void hb_dec(input int x [$], input int ph, output int y [$]);
    y = {};
    for (int n = 0; n < x.size(); n++)
      if (n % 2 == ph) begin
        automatic longint acc = 0;
        automatic longint v;
        for (int k = 0; k < 19; k++) if (n - k >= 0) acc += longint'(hb[k]) * longint'(x[n - k]);
        v = acc >>> 10;
        y.push_back(v > 2047 ? 2047 : v < -2048 ? -2048 : int'(v));
      end
  endfunction

  // does the DUT output (ys) equal the model for some phases and lag?
  function automatic bit model_match(input int stages);
    for (int pm = 0; pm < (1 << stages); pm++) begin
      automatic int m [$] = xin;
      automatic int t [$];
      for (int st = 0; st < stages; st++) begin
        hb_dec(m, (pm >> st) & 1, t);
        m = t;
      end
      for (int lag = -3; lag <= 3; lag++) begin
        automatic bit ok = 1;
        automatic int n = 0;
        for (int i = 4; i < ys.size() - 4; i++)
          if (i + lag >= 0 && i + lag < m.size()) begin
            n++;
            if (ys[i] != m[i + lag]) ok = 0;
          end
        if (ok && n > ys.size() - 12) return 1;
      end
    end
    return 0;
  endfunction

  task automatic restart(input logic [1:0] s);
    @(negedge clk); rst_n = 0; sel = s; in_valid = 0; in = '0;
    @(negedge clk); rst_n = 1; nout = 0; ys = {}; xin = {};
  endtask

  task automatic feed(input int n, input int kind, input int pos);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      in_valid = 1;
      case (kind)
        0: in.re = (i == pos) ? 12'sd1024 : 12'sd0;     // impulse
        1: in.re = 12'sd1000;                           // DC
        3: in.re = 12'(int'($urandom_range(0, 1000)) - 500); // random
        default: in.re = (i % 2) ? -12'sd1000 : 12'sd1000; // f_in/2 tone
      endcase
      in.im = -in.re;
      xin.push_back(int'(in.re));
    end
    @(negedge clk); in_valid = 0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    int odd_taps [10] = '{1, -9, 31, -84, 317, 317, -84, 31, -9, 1};
    repeat (2) @(posedge clk);
    // impulse response at both phases, ratio 2
    for (int ph = 0; ph < 2; ph++) begin
      automatic int nz [$];
      restart(2'd0);
      feed(64, 0, 20 + ph);
      `CHECK(nout == 32, "ratio 2 output count")
      foreach (ys[i]) if (ys[i] != 0) nz.push_back(ys[i]);
      if (nz.size() == 1) begin
        `CHECK(nz[0] == 512, "centre tap")
      end else begin
        automatic bit ok = (nz.size() == 10);
        for (int i = 0; i < 10 && ok; i++) if (nz[i] != odd_taps[i]) ok = 0;
        `CHECK(ok, "odd taps")
      end
    end
    // Nyquist tone is cancelled after the line fills
    restart(2'd0);
    feed(200, 2, 0);
    for (int i = 12; i < ys.size(); i++) `CHECK(ys[i] == 0, "f_in/2 tone cancelled")
    // DC gain and rate for each ratio
    for (int s = 0; s < 3; s++) begin
      restart(2'(s));
      feed(1024, 1, 0);
      `CHECK(nout == 1024 >> (s + 1), "output rate")
      `CHECK(ys[ys.size() - 1] == 1000 && ys[ys.size() - 5] == 1000, "DC gain one")
    end
    // random input against the cascaded model, each ratio
    for (int s = 0; s < 3; s++) begin
      restart(2'(s));
      feed(512, 3, 0);
      `CHECK(model_match(s + 1), "random input matches the cascaded half-band model")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
