// tb_stereo_mpx: workload testbench, a stereo FM broadcast through the
// whole decoder.
//
// The IF carries a standard stereo multiplex signal with 75 kHz peak
// deviation: 0.45 (L+R) + 0.10 pilot(19 kHz) + 0.45 (L-R) sin(2 x pilot),
// with L a 1 kHz tone and R silent, so L+R = L-R = sin(2 pi 1 kHz t). The
// pilot is thus 20 dB below full deviation. The FM output, 334.375 kHz, is
// analysed as the external DSP would see it: Hann-windowed single-bin
// Fourier sums give the amplitudes of
//   L+R at 1 kHz              expected 0.45   * K
//   pilot at 19 kHz           expected 0.10   * K
//   L-R sidebands at 37, 39 kHz  expected 0.225 * K each
// with K = 2^20 * 2*pi*75 kHz / 21.4 MHz LSB per full deviation, times the
// sinc^3 droop of the decimation filter, D(f) = (sin(x)/x)^3 with
// x = pi * f * 64 / 21.4 MHz (0.984 at 19 kHz, 0.94 at 38 kHz), each within
// 2 %. Bins well away from
// any tone (10 kHz, 27 kHz, 100 kHz) must hold less than 1e-4 K.
module tb_stereo_mpx;
  import fmam_pkg::*;
  localparam real FS   = 42.8e6;
  localparam real FOUT = 21.4e6 / 64.0;
  localparam real PI   = 3.14159265358979;
  localparam int  NS   = 4096;          // analysed FM samples (12.2 ms)

  logic clk_if = 0, clk = 0, rst_n = 0;
  logic signed [15:0] if_in = 0;
  logic fm_valid, fm_sat, am_valid, dem_wrap;
  fm_t  fm_out;
  am_t  am_out;
  int checks = 0, failures = 0;

  if_decoder_top dut (.*);

  initial forever begin
    #11.682 clk_if = 1; clk = ~clk;
    #11.682 clk_if = 0;
  end

  initial begin
    #40ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // IF generator: phase is the integral of 75 kHz * mpx(t)
  real phi = 0.0, t = 0.0;
  int  n_if = 0;
  always @(negedge clk_if) if (rst_n) begin
    real mpx, lr;
    t   = n_if / FS;
    lr  = $sin(2.0 * PI * 1000.0 * t);
    mpx = 0.45 * lr + 0.10 * $sin(2.0 * PI * 19000.0 * t)
        + 0.45 * lr * $sin(2.0 * PI * 38000.0 * t);
    phi += 2.0 * PI * 75000.0 * mpx / FS;
    if (phi > PI) phi -= 2.0 * PI;
    if (phi < -PI) phi += 2.0 * PI;
    if_in = 16'($rtoi(20000.0 * $cos(PI / 2.0 * (n_if % 4) + phi)));
    n_if++;
  end

  real x [NS];
  int  nx = 0, skip = 20;
  always @(posedge clk) if (rst_n && fm_valid) begin
    if (skip > 0) skip--;
    else if (nx < NS) begin
      x[nx] = real'(fm_out);
      nx++;
    end
  end

  function automatic real droop(real f);
    real xx = PI * f * 64.0 / 21.4e6;
    real sc = $sin(xx) / xx;
    return sc * sc * sc;
  endfunction

  task automatic tone(real f, real rel, string what);
    real a, e;
    a = amp_at(f);
    e = rel * 1048576.0 * 2.0 * PI * 75000.0 / 21.4e6 * droop(f);
    $display("%-12s %6.0f Hz  %8.1f  exp %8.1f", what, f, a, e);
    check(a > 0.98 * e && a < 1.02 * e, what);
  endtask

  function automatic real amp_at(real f);
    real re = 0.0, im = 0.0, wsum = 0.0, w;
    for (int n = 0; n < NS; n++) begin
      w = 0.5 - 0.5 * $cos(2.0 * PI * n / NS);
      re += w * x[n] * $cos(2.0 * PI * f * n / FOUT);
      im += w * x[n] * $sin(2.0 * PI * f * n / FOUT);
      wsum += w;
    end
    return 2.0 * $sqrt(re * re + im * im) / wsum;
  endfunction

  initial begin
    real k, a;
    k = 1048576.0 * 2.0 * PI * 75000.0 / 21.4e6;
    repeat (4) @(negedge clk_if);
    rst_n = 1;
    wait (nx == NS);
    tone(1000.0, 0.45, "L+R");
    tone(19000.0, 0.10, "pilot");
    tone(37000.0, 0.225, "L-R lower");
    tone(39000.0, 0.225, "L-R upper");
    a = amp_at(10000.0);
    $display("empty 10k   %8.3f", a);
    check(a < 1.0e-4 * k, "empty bin 10 kHz");
    a = amp_at(27000.0);
    $display("empty 27k   %8.3f", a);
    check(a < 1.0e-4 * k, "empty bin 27 kHz");
    a = amp_at(100000.0);
    $display("empty 100k  %8.3f", a);
    check(a < 1.0e-4 * k, "empty bin 100 kHz");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
