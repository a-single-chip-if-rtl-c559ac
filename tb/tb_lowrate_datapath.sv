// tb_lowrate_datapath: self-checking testbench for the multiplexed
// low-rate section (combs, multiplier, adder).
//
// Random decimated integrator values are fed every 64 clocks. A reference
// keeps three comb delays per path in 64-bit arithmetic (wrapped to 24
// bits after each stage, as the hardware does), then forms
// num = Q*dI - I*dQ and den = I*I + Q*Q. The filtered values, num and den
// are compared, and `done` must come 16 clocks after the start edge.
// The integrator values are built as running sums of bounded random steps,
// so the comb outputs stay in range as in the real filter.
module tb_lowrate_datapath;
  import fmam_pkg::*;
  logic  clk = 0, rst_n = 0, start = 0;
  taps_t taps;
  logic  done;
  num_t  num;
  den_t  den;
  taps_t filt;
  int checks = 0, failures = 0;

  lowrate_datapath dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint wrap24(longint v);
    return longint'(acc_t'(v));
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  longint integ [4][3];   // model of the integrator chain per path
  longint dly   [4][3];
  longint y     [4];

  initial begin
    int lat;
    longint e_num, e_den;
    taps = '0;
    foreach (integ[p, k]) begin integ[p][k] = 0; dly[p][k] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      longint t [4];
      longint v;
      // advance each path's integrator model by a block of random input,
      // so that after three combs the outputs are bounded
      for (int p = 0; p < 4; p++) begin
        for (int s = 0; s < 64; s++) begin
          integ[p][0] = wrap24(integ[p][0] + longint'($urandom_range(0, 16)) - 8);
          integ[p][1] = wrap24(integ[p][1] + integ[p][0]);
          integ[p][2] = wrap24(integ[p][2] + integ[p][1]);
        end
        t[p] = (p < 2) ? integ[p][2] : integ[p][1];
      end
      // reference combs
      for (int p = 0; p < 4; p++) begin
        v = t[p];
        for (int k = 0; k < 3; k++) begin
          longint d;
          d = dly[p][k];
          dly[p][k] = v;
          v = wrap24(v - d);
        end
        y[p] = v;
      end
      e_num = y[1] * y[2] - y[0] * y[3];
      e_den = y[0] * y[0] + y[1] * y[1];
      @(negedge clk);
      taps = '{i: acc_t'(t[0]), q: acc_t'(t[1]), di: acc_t'(t[2]), dq: acc_t'(t[3])};
      start = 1;
      @(negedge clk);
      start = 0;
      lat = 0;
      while (!done) begin @(negedge clk); lat++; end
      check(lat == 16, $sformatf("latency %0d", lat));
      check(longint'(filt.i) == y[0] && longint'(filt.q) == y[1] &&
            longint'(filt.di) == y[2] && longint'(filt.dq) == y[3],
            $sformatf("n=%0d filt %0d %0d %0d %0d exp %0d %0d %0d %0d", n,
                      filt.i, filt.q, filt.di, filt.dq, y[0], y[1], y[2], y[3]));
      check(longint'(num) == e_num, $sformatf("n=%0d num %0d exp %0d", n, num, e_num));
      check(longint'(den) == e_den, $sformatf("n=%0d den %0d exp %0d", n, den, e_den));
      repeat (40) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
