// tb_fmam_demodulator: self-checking testbench for the digital FM/AM
// demodulator.
//
// The testbench holds its own floating-point model of a second-order,
// 17-level sigma-delta modulator that converts a complex baseband tone
// (I = A cos(phi), Q = -A sin(phi), I on even ticks, Q on odd ticks), so
// the demodulator sees the same kind of stream as on the chip. As from the
// sampling filter, an I value is taken half a tick after its own tick. For a set of
// frequency offsets f it checks, after the filters have settled:
//   fm_out ~ 2^20 * sin(2*pi*f / 21.4 MHz)     (mean, within 0.5 % + 8 LSB)
//   am_out ~ A * 2^18 * |sinc droop|           (mean, within 1 %)
// plus a clipped output with fm_sat at f = 130 kHz, and that fm_valid and
// am_valid come exactly once every 64 clocks.
module tb_fmam_demodulator;
  import fmam_pkg::*;
  localparam real FCLK = 21.4e6;
  localparam real PI   = 3.14159265358979;

  logic  clk = 0, rst_n = 0;
  code_t code;
  logic  sel_q;
  logic  fm_valid, fm_sat, am_valid;
  fm_t   fm_out;
  am_t   am_out;
  int checks = 0, failures = 0;

  fmam_demodulator dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50000000;
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

  // modulator model state
  real v1 [2], v2 [2];
  real phi = 0.0, amp = 5.0, freq = 0.0;
  int  tick = 0;

  function automatic int quant(real v);
    int q = $rtoi(v + 100.5) - 100;   // round to nearest
    if (q > 8) q = 8;
    if (q < -8) q = -8;
    return q;
  endfunction

  // drive one code per clock
  always @(negedge clk) if (rst_n) begin
    int c, y;
    real u;
    c = tick & 1;
    phi = phi + 2.0 * PI * freq / FCLK;
    if (phi > PI) phi = phi - 2.0 * PI;
    if (phi < -PI) phi = phi + 2.0 * PI;
    u = c ? -amp * $sin(phi) : amp * $cos(phi + PI * freq / FCLK);
    y = quant(v2[c]);
    v1[c] = v1[c] + u - y;
    v2[c] = v2[c] + v1[c] - y;
    sel_q = c[0];
    code  = code_t'(y + 8);
    tick++;
  end

  int fm_count = 0, am_count = 0, last_fm = -1, last_am = -1, ncyc = 0;
  longint fm_sum = 0, am_sum = 0;
  int n_acc = 0, n_sat = 0;
  bit measuring = 0;

  always @(posedge clk) if (rst_n) begin
    ncyc++;
    if (fm_valid) begin
      if (last_fm >= 0) check(ncyc - last_fm == 64, $sformatf("fm spacing %0d", ncyc - last_fm));
      last_fm = ncyc;
      fm_count++;
      if (fm_sat) n_sat++;
      if (measuring) begin fm_sum += longint'(fm_out); n_acc++; end
    end
    if (am_valid) begin
      if (last_am >= 0) check(ncyc - last_am == 64, $sformatf("am spacing %0d", ncyc - last_am));
      last_am = ncyc;
      am_count++;
      if (measuring) am_sum += longint'(am_out);
    end
  end

  task automatic run(real f, real a);
    real w, exp_fm, exp_am, got_fm, got_am, droop, s;
    freq = f; amp = a;
    measuring = 0;
    repeat (64 * 12) @(posedge clk);   // settle
    fm_sum = 0; am_sum = 0; n_acc = 0;
    measuring = 1;
    repeat (64 * 64) @(posedge clk);
    measuring = 0;
    w = 2.0 * PI * f / FCLK;
    exp_fm = 1048576.0 * $sin(w);
    if (exp_fm > 32767.0) exp_fm = 32767.0;
    if (exp_fm < -32767.0) exp_fm = -32767.0;
    s = (w == 0.0) ? 1.0 : $sin(32.0 * w) / (64.0 * $sin(w / 2.0));
    droop = s * s * s;
    if (droop < 0) droop = -droop;
    exp_am = a * 262144.0 * droop;
    got_fm = real'(fm_sum) / n_acc;
    got_am = real'(am_sum) / n_acc;
    $display("f=%8.0f A=%0.2f fm %9.2f (exp %9.2f)  am %10.1f (exp %10.1f)", f, a, got_fm, exp_fm, got_am, exp_am);
    check(got_fm - exp_fm < 0.005 * (exp_fm < 0 ? -exp_fm : exp_fm) + 8.0 &&
          exp_fm - got_fm < 0.005 * (exp_fm < 0 ? -exp_fm : exp_fm) + 8.0, $sformatf("fm at %0f", f));
    check(got_am < exp_am * 1.01 && got_am > exp_am * 0.99, $sformatf("am at %0f", f));
  endtask

  initial begin
    code = 8; sel_q = 0;
    v1[0] = 0; v1[1] = 0; v2[0] = 0; v2[1] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(0.0, 5.0);
    run(50000.0, 5.0);
    run(-50000.0, 5.0);
    run(75000.0, 3.0);
    run(-100000.0, 5.5);
    run(20000.0, 1.0);
    // beyond the +-104 kHz range: clipped
    n_sat = 0;
    run(130000.0, 5.0);
    check(n_sat > 50, $sformatf("saturated samples %0d", n_sat));
    check(fm_count > 400 && am_count > 400, "outputs produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
