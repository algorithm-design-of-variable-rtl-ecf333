// tb_qam_receiver_top: end-to-end run of the receiver at its default sizes.
//
// The stimulus is a 64-QAM signal at 28.92/5.2 = 5.56 MBd (1.3 samples of
// the decimated rate per output sample), shaped by a root raised cosine
// (roll-off 0.15), put on a carrier at f_s/4 as a real IF signal, with a
// 0.5-symbol-delayed echo of -22 dB, a carrier phase of 30 degrees and a
// symbol-rate error of 100 ppm, plus noise (SNR about 30 dB). A behavioural
// gain stage in front of the ADC scales the signal by if_gain/2048 and by
// 2^((rf_gain-2048)/1024), closing the AGC loop; the input is weak enough
// that the IF gain alone cannot reach the target and the RF gain must take
// over. The receiver runs with decimation ratio 2 and the T/2 equalizer.
//
// The run lasts through timing acquisition, CMA, DD-LMS and decision
// feedback (the mode controller's default symbol counts) and then 3000
// more symbols. Checks:
//  - every mechanism happened: IF and RF gain changes, decimator outputs at half
//    the ADC rate, NCO strobes at twice the symbol rate, each of the four
//    operating modes, four-corners carrier updates, decision feedback on p2;
//  - three short runs check the decimator and symbol rates: ratio 4 with
//    the symbol-spaced equalizer at 2.78 MBd, then the ends of the symbol
//    rate range, 7 MBd at ratio 2 and 875 kBd at ratio 8.
//  - the decisions of the last 2000 symbols match the sent symbols (at the
//    best delay and quarter-turn rotation) for at least 99% of symbols.
`include "tb/tb_check.svh"
module tb_qam_receiver_top;
  import qam_pkg::*;
  logic clk = 0, rst_n = 0;
  logic signed [11:0] adc_in = 0;
  logic [1:0] dec_sel = 2'd0;
  logic [39:0] tr_freq_word;
  logic tr_enable = 1, fse = 1;
  logic [11:0] rf_gain, if_gain;
  logic sym_valid, dec_out_valid, rs_valid, rf_step;
  logic [2:0] sym_i, sym_q;
  cplx_t x_soft, eq_err;
  eq_mode_e mode;
  logic signed [23:0] tr_lf_out, cr_lf_out;
  int checks = 0, failures = 0;

  localparam int  NSYM = 2048 + 16384 + 8192 + 3000;
  localparam real SPS  = 5.2;              // ADC samples per symbol
  localparam real PI   = 3.14159265358979;
  int ar [NSYM + 20], ai [NSYM + 20];
  int dr [$], di [$];
  int n_rf = 0, n_agc = 0, n_dec = 0, n_strobe = 0, n_fc = 0, n_p2 = 0, n_mode [4];
  int n_adc = 0;
  logic [11:0] if_prev;

  qam_receiver_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    #3000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  always @(posedge clk) if (rst_n) begin
    if (if_gain != if_prev) n_agc++;
    if_prev <= if_gain;
    if (dec_out_valid) n_dec++;
    if (rf_step) n_rf++;
    if (rs_valid) n_strobe++;
    if (dut.u_dfe.pd_valid && mode == MODE_CMA) n_fc++;
    if (sym_valid) begin
      n_mode[int'(mode)]++;
      if (mode == MODE_DFE) n_p2++;
      dr.push_back(2 * int'(sym_i) - 7);
      di.push_back(2 * int'(sym_q) - 7);
    end
  end

  function automatic real rrc(real t);
    real a = 0.15;
    if (t > -1e-9 && t < 1e-9) return 1.0 - a + 4.0 * a / PI;
    if ((4.0 * a * t) ** 2 > 0.999999 && (4.0 * a * t) ** 2 < 1.000001)
      return a / $sqrt(2.0) * ((1.0 + 2.0 / PI) * $sin(PI / (4.0 * a)) + (1.0 - 2.0 / PI) * $cos(PI / (4.0 * a)));
    return ($sin(PI * t * (1.0 - a)) + 4.0 * a * t * $cos(PI * t * (1.0 + a))) /
           (PI * t * (1.0 - (4.0 * a * t) ** 2));
  endfunction

  function automatic real gauss();
    real u1 = (real'($urandom_range(1, 1000000))) / 1000000.0;
    real u2 = (real'($urandom_range(0, 1000000))) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

  // fraction of right decisions in [from, to) over delays and rotations
  function automatic real score(int from, int to);
    real best = 0;
    for (int dly = 0; dly < 40; dly++)
      for (int rot = 0; rot < 4; rot++) begin
        int ok = 0;
        for (int n = from; n < to; n++) begin
          int sr = ar[n - dly], si = ai[n - dly], t;
          for (int q = 0; q < rot; q++) begin t = sr; sr = -si; si = t; end
          if (dr[n] == sr && di[n] == si) ok++;
        end
        if (real'(ok) / real'(to - from) > best) best = real'(ok) / real'(to - from);
      end
    return best;
  endfunction

  // send nsym symbols at ts ADC samples per symbol
  task automatic send(int nsym, real ts, real amp);
    int nsamp = int'(real'(nsym) * ts);
    for (int n = 0; n < nsamp; n++) begin
      automatic real t = real'(n) / ts;
      automatic real sr = 0, si = 0, x, g;
      automatic int k0 = int'($floor(t));
      for (int k = k0 - 10; k <= k0 + 10; k++)
        if (k >= 0 && k < nsym) begin
          automatic real p = rrc(t - real'(k)), q = 0.08 * rrc(t - real'(k) - 0.5);
          sr += ar[k] * (p + q);
          si += ai[k] * (p + q);
        end
      // carrier phase 30 degrees, IF at f_s/4
      x = sr * $cos(PI / 2.0 * real'(n) + PI / 6.0) - si * $sin(PI / 2.0 * real'(n) + PI / 6.0);
      x = amp * x + 0.1 * amp * gauss();
      // behavioural RF and IF gain stages
      g = real'(if_gain) / 2048.0 * (2.0 ** ((real'(rf_gain) - 2048.0) / 1024.0));
      x = x * g;
      @(negedge clk);
      adc_in = 12'(x > 2047.0 ? 2047 : x < -2048.0 ? -2048 : int'(x));
      n_adc++;
      if (n % 20000 == 0)
        $display("INFO sample %0d mode %s if_gain %0d rf_gain %0d tr_lf %0d cr_lf %0d symbols %0d",
                 n, mode.name(), if_gain, rf_gain, tr_lf_out, cr_lf_out, dr.size());
    end
  endtask

  // restart the receiver at decimation ratio 2^(sel+1), send 3000 symbols
  // at ts ADC samples per symbol and check the decimator and symbol rates
  task automatic rate_run(input logic [1:0] sel, input real ts, input logic f);
    automatic int nsym = 3000, n2;
    automatic int ratio = 2 << sel;
    @(negedge clk);
    rst_n = 0; dec_sel = sel; fse = f;
    tr_freq_word = 40'(longint'(real'(64'd1099511627776) * 2.0 * real'(ratio) / ts));
    n_dec = 0; n_adc = 0; n_strobe = 0; dr = {}; di = {};
    repeat (3) @(negedge clk);
    rst_n = 1;
    send(nsym, ts, 25.0);
    repeat (2 * int'(ts)) @(negedge clk);
    n2 = dr.size();
    $display("INFO ratio %0d, %f samples per symbol: dec %0d/%0d, strobes %0d, symbols %0d",
             ratio, ts, n_dec, n_adc, n_strobe, n2);
    `CHECK(n_dec > n_adc / ratio - 20 && n_dec < n_adc / ratio + 20, "decimator output rate")
    `CHECK(n2 > nsym - 20 && n2 < nsym + 10 && n_strobe > 2 * n2 - 10 && n_strobe < 2 * n2 + 10,
           "one symbol per symbol period")
  endtask

  initial begin
    real s_end;
    for (int k = 0; k < NSYM + 20; k++) begin
      ar[k] = int'($urandom_range(0, 7)) * 2 - 7;
      ai[k] = int'($urandom_range(0, 7)) * 2 - 7;
    end
    // run 1: ratio 2, T/2 equalizer, 5.56 MBd, 100 ppm slow, weak input
    tr_freq_word = 40'(longint'(real'(64'd1099511627776) / 1.3));
    if_prev = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    send(NSYM, SPS * (1.0 + 100e-6), 25.0);
    repeat (20) @(negedge clk);
    $display("INFO symbols out %0d, modes ACQ %0d CMA %0d LMS %0d DFE %0d, agc %0d rf %0d, dec %0d/%0d, strobes %0d, corners %0d",
             dr.size(), n_mode[3], n_mode[0], n_mode[1], n_mode[2], n_agc, n_rf, n_dec, n_adc, n_strobe, n_fc);
    `CHECK(n_agc > 0, "AGC adjusted the IF gain")
    `CHECK(n_rf > 0, "AGC handed over to the RF gain")
    `CHECK(n_dec > n_adc / 2 - 20 && n_dec < n_adc / 2 + 20, "decimator output at f_s/2")
    `CHECK(n_strobe > 2 * dr.size() - 10 && n_strobe < 2 * dr.size() + 10, "NCO strobes at 2 f_T")
    // the decision of a symbol leaves the equalizer a few clocks after the
    // symbol that ends a phase, so the counts may be off by one
    `CHECK(n_mode[3] >= 2047 && n_mode[3] <= 2049 && n_mode[0] >= 16383 && n_mode[0] <= 16385 &&
           n_mode[1] >= 8191 && n_mode[1] <= 8193, "acquisition phases lasted their symbol counts")
    `CHECK(n_p2 > 0, "decision feedback on path p2 used")
    `CHECK(n_fc > 0, "four-corners carrier updates")
    $display("INFO right decisions at the end of CMA %f, of LMS %f",
             score(2048 + 16384 - 1000, 2048 + 16384), score(2048 + 16384 + 8192 - 1000, 2048 + 16384 + 8192));
    s_end = score(dr.size() - 2000, dr.size());
    $display("INFO right decisions in the last 2000 symbols: %f", s_end);
    `CHECK(s_end > 0.99, "symbols recovered end to end")
    // short runs that check only the rates: ratio 4 with the symbol-spaced
    // equalizer at 2.78 MBd, and the two ends of the symbol-rate range,
    // 7 MBd at ratio 2 and 875 kBd at ratio 8 (R = 1.033 in both)
    rate_run(2'd1, 2.0 * SPS, 1'b0);
    rate_run(2'd0, 28.92 / 7.0, 1'b1);
    rate_run(2'd2, 28.92 / 0.875, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
