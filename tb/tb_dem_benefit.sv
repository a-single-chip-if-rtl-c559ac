// tb_dem_benefit: shows what the dynamic element matching buys.
//
// Two converter chains run side by side on the same I/Q from one sampling
// filter. Both use a modulator whose 16 unit DAC elements have errors of
// up to +-1 %. Chain A selects elements with dwa_dem; chain B always uses
// the same elements (plain thermometer code). A constant-amplitude carrier
// with a fixed frequency offset is applied, so an ideal converter gives
// constant fm_out and am_out. Static DAC errors turn into distortion that
// shows as ripple on both. The testbench measures the rms deviation of
// fm_out and am_out from their means in both chains and requires the DEM
// chain to be at least 10 dB better in each, and its FM mean to be within
// 1 % of 2^20 sin(2 pi f / 21.4 MHz).
module tb_dem_benefit;
  import fmam_pkg::*;
  localparam real FS = 42.8e6;
  localparam real PI = 3.14159265358979;
  localparam real F0 = 30000.0;

  logic clk_if = 0, clk = 0, rst_n = 0;
  logic signed [15:0] if_in = 0, i_s, q_s;
  int checks = 0, failures = 0;

  // chain A: with DEM
  logic        sel_a, sel_b;
  code_t       code_a, code_b;
  logic [15:0] dac_a, dac_b;
  logic        wrap_a;
  logic        fv_a, fs_a, av_a, fv_b, fs_b, av_b;
  fm_t         fm_a, fm_b;
  am_t         am_a, am_b;

  sampling_filter #(.W(16)) u_sf (.clk_if, .rst_n, .if_in, .i_out(i_s), .q_out(q_s));

  sd_modulator #(.MISMATCH_PPM(10000)) u_mod_a (
    .clk, .rst_n, .i_in(i_s), .q_in(q_s), .sel_q(sel_a), .code(code_a), .dac_sel(dac_a));
  dwa_dem #(.N(16)) u_dem_a (.clk, .rst_n, .code(code_a), .sel_q(sel_a), .dac_sel(dac_a), .wrap(wrap_a));
  fmam_demodulator u_dm_a (.clk, .rst_n, .code(code_a), .sel_q(sel_a),
    .fm_valid(fv_a), .fm_out(fm_a), .fm_sat(fs_a), .am_valid(av_a), .am_out(am_a));

  // chain B: fixed thermometer selection
  sd_modulator #(.MISMATCH_PPM(10000)) u_mod_b (
    .clk, .rst_n, .i_in(i_s), .q_in(q_s), .sel_q(sel_b), .code(code_b), .dac_sel(dac_b));
  always_comb begin
    dac_b = '0;
    for (int k = 0; k < 16; k++) dac_b[k] = (k < int'(code_b));
  end
  fmam_demodulator u_dm_b (.clk, .rst_n, .code(code_b), .sel_q(sel_b),
    .fm_valid(fv_b), .fm_out(fm_b), .fm_sat(fs_b), .am_valid(av_b), .am_out(am_b));

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
      $display("FAIL %s", what);
    end
  endtask

  real phi = 0.0;
  int  n_if = 0;
  always @(negedge clk_if) if (rst_n) begin
    phi += 2.0 * PI * F0 / FS;
    if (phi > PI) phi -= 2.0 * PI;
    if_in = 16'($rtoi(22000.0 * $cos(PI / 2.0 * (n_if % 4) + phi)));
    n_if++;
  end

  // statistics: sum and sum of squares per chain
  real s_fa = 0, q_fa = 0, s_fb = 0, q_fb = 0, s_aa = 0, q_aa = 0, s_ab = 0, q_ab = 0;
  int  n_a = 0, n_b = 0, skip_a = 40, skip_b = 40;
  localparam int NS = 3000;
  always @(posedge clk) if (rst_n) begin
    if (fv_a) begin
      if (skip_a > 0) skip_a--;
      else if (n_a < NS) begin
        s_fa += real'(fm_a); q_fa += real'(fm_a) * real'(fm_a);
        s_aa += real'(am_a); q_aa += real'(am_a) * real'(am_a);
        n_a++;
      end
    end
    if (fv_b) begin
      if (skip_b > 0) skip_b--;
      else if (n_b < NS) begin
        s_fb += real'(fm_b); q_fb += real'(fm_b) * real'(fm_b);
        s_ab += real'(am_b); q_ab += real'(am_b) * real'(am_b);
        n_b++;
      end
    end
  end

  function automatic real rms(real s, real q, int n);
    real m = s / n;
    real v = q / n - m * m;
    return (v > 1.0e-6) ? $sqrt(v) : 1.0e-3;
  endfunction

  initial begin
    real fa, fb, aa, ab, mean_a, exp_fm;
    repeat (4) @(negedge clk_if);
    rst_n = 1;
    wait (n_a == NS && n_b == NS);
    fa = rms(s_fa, q_fa, NS); fb = rms(s_fb, q_fb, NS);
    aa = rms(s_aa, q_aa, NS); ab = rms(s_ab, q_ab, NS);
    mean_a = s_fa / NS;
    exp_fm = 1048576.0 * $sin(2.0 * PI * F0 / 21.4e6);
    $display("FM rms ripple: DEM %0.2f LSB, no DEM %0.2f LSB (%0.1f dB)", fa, fb, 20.0 * $log10(fb / fa));
    $display("AM rms ripple: DEM %0.2f LSB, no DEM %0.2f LSB (%0.1f dB)", aa, ab, 20.0 * $log10(ab / aa));
    $display("FM mean with DEM %0.2f, expected %0.2f", mean_a, exp_fm);
    check(fb > 3.16 * fa, "DEM lowers FM ripple by 10 dB");
    check(ab > 3.16 * aa, "DEM lowers AM ripple by 10 dB");
    check(mean_a > 0.99 * exp_fm && mean_a < 1.01 * exp_fm, "FM mean with DEM");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
