// tb_if_decoder_top: end-to-end testbench of the IF FM/AM decoder at its
// default (full) size.
//
// The testbench plays the tuner: it generates the 10.7 MHz IF sampled at
// 42.8 MHz, if_in = A(t) * cos(pi/2 * n + phi(n)), with phi advancing by
// 2*pi*f/42.8 MHz per sample, and supplies clk_if (42.8 MHz) and clk
// (21.4 MHz, rising on every other clk_if rising edge). Phases:
//   1. FM, constant frequency offsets of both signs (at 0 Hz the noise
//      in the output must be 80 dB below a full 75 kHz deviation): the mean of fm_out
//      must be 2^20 * sin(2*pi*f / 21.4 MHz) within 1 % + 16 LSB, and
//      its peak-to-peak ripple under 80 LSB.
//   2. FM beyond the +-104 kHz output range: fm_out clipped, fm_sat set.
//   3. AM, 50 % modulation at 5 kHz on an unmodulated carrier: the maximum
//      and minimum of am_out must be 64 * A0 * (1 +- 0.5) within 2 %, and
//      fm_out must stay near 0 (AM suppression).
// Throughout, fm_valid and am_valid must come every 64 clocks. Each
// mechanism is counted (positive and negative FM, clipping, AM envelope,
// DEM pointer wrap-around) and one that never happened counts a failure.
module tb_if_decoder_top;
  import fmam_pkg::*;
  localparam real FS = 42.8e6;
  localparam real PI = 3.14159265358979;

  logic clk_if = 0, clk = 0, rst_n = 0;
  logic signed [15:0] if_in = 0;
  logic fm_valid, fm_sat, am_valid, dem_wrap;
  fm_t  fm_out;
  am_t  am_out;
  int checks = 0, failures = 0;

  if_decoder_top dut (.*);

  // clk toggles on every clk_if rising edge
  initial forever begin
    #11.682 clk_if = 1; clk = ~clk;
    #11.682 clk_if = 0;
  end

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // IF generator
  real phi = 0.0, freq = 0.0, amp = 20000.0, am_depth = 0.0, am_f = 5000.0;
  real am_ph = 0.0;
  int  n_if = 0;
  always @(negedge clk_if) if (rst_n) begin
    real a;
    phi += 2.0 * PI * freq / FS;
    if (phi > PI) phi -= 2.0 * PI;
    if (phi < -PI) phi += 2.0 * PI;
    am_ph += 2.0 * PI * am_f / FS;
    if (am_ph > PI) am_ph -= 2.0 * PI;
    a = amp * (1.0 + am_depth * $sin(am_ph));
    if_in = 16'($rtoi(a * $cos(PI / 2.0 * (n_if % 4) + phi)));
    n_if++;
  end

  // output monitor
  int ncyc = 0, last_fm = -1, last_am = -1;
  longint fm_sum = 0;
  real    fm_sq = 0.0;
  int n_acc = 0, fm_min = 0, fm_max = 0;
  int am_min = 0, am_max = 0;
  bit measuring = 0;
  int cnt_fm_pos = 0, cnt_fm_neg = 0, cnt_sat = 0, cnt_am_env = 0, cnt_wrap = 0, cnt_out = 0;

  always @(posedge clk) if (rst_n) begin
    ncyc++;
    if (dem_wrap) cnt_wrap++;
    if (fm_valid) begin
      if (last_fm >= 0) check(ncyc - last_fm == 64, "fm spacing");
      last_fm = ncyc;
      cnt_out++;
      if (fm_sat) cnt_sat++;
      if (measuring) begin
        fm_sum += longint'(fm_out);
        fm_sq  += real'(fm_out) * real'(fm_out);
        n_acc++;
        if (int'(fm_out) < fm_min) fm_min = int'(fm_out);
        if (int'(fm_out) > fm_max) fm_max = int'(fm_out);
      end
    end
    if (am_valid) begin
      if (last_am >= 0) check(ncyc - last_am == 64, "am spacing");
      last_am = ncyc;
      if (measuring) begin
        if (int'(am_out) < am_min) am_min = int'(am_out);
        if (int'(am_out) > am_max) am_max = int'(am_out);
      end
    end
  end

  task automatic measure(int n_out);
    repeat (64 * 12) @(posedge clk);     // settle
    fm_sum = 0; n_acc = 0; fm_sq = 0.0;
    fm_min = 32767; fm_max = -32768;
    am_min = 32'h7fffffff; am_max = 0;
    measuring = 1;
    repeat (64 * n_out) @(posedge clk);
    measuring = 0;
  endtask

  task automatic fm_step(real f);
    real exp_fm, got, tol;
    freq = f; am_depth = 0.0;
    measure(64);
    exp_fm = 1048576.0 * $sin(2.0 * PI * f / 21.4e6);
    if (exp_fm > 32767.0) exp_fm = 32767.0;
    if (exp_fm < -32767.0) exp_fm = -32767.0;
    got = real'(fm_sum) / n_acc;
    tol = 0.01 * (exp_fm < 0 ? -exp_fm : exp_fm) + 16.0;
    $display("FM f=%8.0f  mean %9.2f  exp %9.2f  (min %0d max %0d)", f, got, exp_fm, fm_min, fm_max);
    check(got - exp_fm < tol && exp_fm - got < tol, $sformatf("FM mean at %0f", f));
    // I and Q in quadrature: a constant frequency gives an almost flat
    // output (a half-tick I/Q timing error alone would give +-1 %)
    if (exp_fm < 32767.0 && exp_fm > -32767.0)
      check(fm_max - fm_min < 80, $sformatf("FM ripple %0d at %0f", fm_max - fm_min, f));
    if (f == 0.0) begin
      // noise over the whole output band (0..167 kHz) against a full
      // 75 kHz deviation sine: at least 80 dB
      real rms, snr;
      rms = $sqrt(fm_sq / n_acc - got * got);
      if (rms < 1.0e-3) rms = 1.0e-3;
      snr = 20.0 * $log10(1048576.0 * $sin(2.0 * PI * 75000.0 / 21.4e6) / $sqrt(2.0) / rms);
      $display("FM noise rms %0.3f LSB, SNR %0.1f dB", rms, snr);
      check(snr > 80.0, "SNR above 80 dB");
    end
    if (f > 0 && got > 0) cnt_fm_pos++;
    if (f < 0 && got < 0) cnt_fm_neg++;
  endtask

  initial begin
    real e_max, e_min;
    repeat (4) @(negedge clk_if);
    rst_n = 1;
    // 1. FM
    fm_step(0.0);
    fm_step(40000.0);
    fm_step(-40000.0);
    fm_step(75000.0);
    fm_step(-75000.0);
    amp = 8000.0;
    fm_step(60000.0);
    amp = 20000.0;
    // 2. over-deviation
    fm_step(125000.0);
    fm_step(-125000.0);
    // 3. AM: 50 % at 5 kHz, measured over one 5 kHz period and more
    freq = 0.0; am_depth = 0.5; amp = 16000.0;
    measure(80);
    e_max = 64.0 * 16000.0 * 1.5;
    e_min = 64.0 * 16000.0 * 0.5;
    $display("AM max %0d (exp %0.0f) min %0d (exp %0.0f); FM during AM %0d..%0d", am_max, e_max, am_min, e_min, fm_min, fm_max);
    check(am_max < e_max * 1.02 && am_max > e_max * 0.98, "AM maximum");
    check(am_min < e_min * 1.02 && am_min > e_min * 0.98, "AM minimum");
    check(fm_max < 200 && fm_min > -200, "AM suppressed in FM output");
    if (am_max > am_min + 100000) cnt_am_env++;
    // every mechanism must have happened
    $display("counts: fm+ %0d fm- %0d clipped %0d am-envelope %0d dem-wrap %0d outputs %0d",
             cnt_fm_pos, cnt_fm_neg, cnt_sat, cnt_am_env, cnt_wrap, cnt_out);
    check(cnt_fm_pos > 0, "positive FM seen");
    check(cnt_fm_neg > 0, "negative FM seen");
    check(cnt_sat > 0, "clipping seen");
    check(cnt_am_env > 0, "AM envelope seen");
    check(cnt_wrap > 0, "DEM wrap seen");
    check(cnt_out > 500, "outputs produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
