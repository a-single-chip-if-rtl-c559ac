// tb_sd_modulator: self-checking testbench for the sigma-delta modulator
// model, closed with an ideal thermometer DAC selection.
//
// Checks: sel_q alternates; every code is within 0..16; the loop stays
// stable; the mean of (code - 8) * 4096 over many ticks equals each
// channel's DC input (I and Q differ, so crossed channels would show); and
// a full-scale-step input is tracked. For DC inputs the first-order
// noise-shaped running error |sum(u - y)| must stay bounded, which only
// holds while the loop integrates correctly.
module tb_sd_modulator;
  import fmam_pkg::*;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] i_in, q_in;
  logic sel_q;
  code_t code;
  logic [15:0] dac_sel;
  int checks = 0, failures = 0;

  sd_modulator #(.MISMATCH_PPM(0)) dut (.*);

  always_comb begin
    dac_sel = '0;
    for (int k = 0; k < 16; k++) dac_sel[k] = (k < int'(code));
  end

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic run_dc(int di, int dq, int n);
    longint sum [2];
    longint err [2];
    longint maxerr;
    logic prev;
    i_in = 16'(di); q_in = 16'(dq);
    repeat (50) @(negedge clk);
    sum[0] = 0; sum[1] = 0; err[0] = 0; err[1] = 0; maxerr = 0;
    prev = sel_q;
    for (int t = 0; t < 2 * n; t++) begin
      @(negedge clk);
      check(sel_q != prev, "sel_q alternates");
      prev = sel_q;
      check(int'(code) <= 16, "code range");
      sum[sel_q] += longint'(code) - 8;
      err[sel_q] += (sel_q ? longint'(dq) : longint'(di)) - (longint'(code) - 8) * 4096;
      if (err[sel_q] > maxerr) maxerr = err[sel_q];
      if (-err[sel_q] > maxerr) maxerr = -err[sel_q];
    end
    // mean within 2 LSB of input over n samples
    check(sum[0] * 4096 - longint'(di) * n inside {[-3 * 4096 * 4 : 3 * 4096 * 4]},
          $sformatf("I mean %0d vs %0d", sum[0] * 4096 / n, di));
    check(sum[1] * 4096 - longint'(dq) * n inside {[-3 * 4096 * 4 : 3 * 4096 * 4]},
          $sformatf("Q mean %0d vs %0d", sum[1] * 4096 / n, dq));
    check(maxerr < 4 * 4096 * 4, $sformatf("running error %0d", maxerr));
  endtask

  initial begin
    i_in = 0; q_in = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_dc(0, 0, 2000);
    run_dc(12345, -7000, 4000);
    run_dc(-20000, 18000, 4000);
    run_dc(24000, -24000, 4000);
    run_dc(-3, 5, 4000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
