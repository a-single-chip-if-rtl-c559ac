// tb_sinc3_integrators: self-checking testbench for the high-rate half of
// the sinc^3 filters.
//
// A random code stream with alternating I/Q ticks is applied. At each
// decimation strobe the testbench runs the latched integrator values
// through three combs of its own and compares the result with a direct
// convolution of the zero-stuffed input history of each channel:
//   main path  with h3 = box64 * box64 * box64  (delay 3 ticks)
//   derivative with hd = box64 * box64 - (same, 64 ticks later)  (delay 2)
// where the I kernels are further convolved with [1 1] (half-tick delay)
// and the Q kernels are doubled.
// The strobe must come every 64 clocks.
module tb_sinc3_integrators;
  import fmam_pkg::*;
  localparam int DEC = 64;
  logic  clk = 0, rst_n = 0;
  code_t code;
  logic  sel_q;
  logic  dec_strobe;
  taps_t taps;
  int checks = 0, failures = 0;

  sinc3_integrators #(.DEC(DEC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NH3 = 3 * DEC - 2;
  localparam int NH2 = 2 * DEC - 1;
  longint h3 [NH3];
  longint hd [NH2 + DEC];
  longint xi [20000];
  longint xq [20000];
  int e = 0;            // rising edges since reset
  int last_strobe = -1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic longint wrap24(longint v);
    return longint'(acc_t'(v));
  endfunction

  // direct convolution of channel c (0: I, 1: Q) with h3 (deriv=0) or hd
  function automatic longint fir(bit c, bit deriv, int n0);
    longint s = 0;
    longint xv, hv;
    int len = deriv ? NH2 + DEC : NH3;
    for (int j = 0; j < len; j++) if (n0 - j >= 1) begin
      hv = deriv ? hd[j] : h3[j];
      if (c) s += 2 * hv * xq[n0 - j];
      else begin
        s += hv * xi[n0 - j];
        if (n0 - j - 1 >= 1) s += hv * xi[n0 - j - 1];
      end
    end
    return s;
  endfunction

  // record the input sampled at every edge
  always @(posedge clk) if (rst_n) begin
    e++;
    xi[e] = sel_q ? 0 : longint'(code) - 8;
    xq[e] = sel_q ? longint'(code) - 8 : 0;
  end

  longint dly [4][3];

  initial begin
    longint b2 [NH2];
    foreach (b2[j]) b2[j] = 0;
    foreach (h3[j]) h3[j] = 0;
    foreach (hd[j]) hd[j] = 0;
    for (int a = 0; a < DEC; a++) for (int b = 0; b < DEC; b++) b2[a + b]++;
    for (int j = 0; j < NH2; j++) for (int c = 0; c < DEC; c++) h3[j + c] += b2[j];
    for (int j = 0; j < NH2; j++) begin hd[j] += b2[j]; hd[j + DEC] -= b2[j]; end
    foreach (dly[p, k]) dly[p][k] = 0;
    code = 8; sel_q = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
  end

  // stimulus: slow random walk plus noise, so the filter output is large
  initial begin
    int level = 0;
    wait (rst_n);
    forever begin
      @(negedge clk);
      sel_q = ~sel_q;
      if ($urandom_range(0, 99) == 0) level = $urandom_range(0, 12) - 6;
      code = code_t'(8 + level + $urandom_range(0, 4) - 2);
    end
  end

  initial begin
    int n_out = 0;
    wait (rst_n);
    while (n_out < 250) begin
      @(negedge clk);
      if (dec_strobe) begin
        longint t [4];
        longint y [4];
        longint ei, eq, edi, edq;
        n_out++;
        if (last_strobe >= 0) check(e - last_strobe == DEC, $sformatf("strobe spacing %0d", e - last_strobe));
        last_strobe = e;
        t[0] = taps.i; t[1] = taps.q; t[2] = taps.di; t[3] = taps.dq;
        for (int p = 0; p < 4; p++) begin
          longint v, d;
          v = t[p];
          for (int k = 0; k < 3; k++) begin
            d = dly[p][k]; dly[p][k] = v; v = wrap24(v - d);
          end
          y[p] = v;
        end
        ei  = fir(0, 0, e - 3);
        eq  = fir(1, 0, e - 3);
        edi = fir(0, 1, e - 2);
        edq = fir(1, 1, e - 2);
        check(y[0] == ei && y[1] == eq, $sformatf("main n=%0d got %0d %0d exp %0d %0d", n_out, y[0], y[1], ei, eq));
        check(y[2] == edi && y[3] == edq, $sformatf("deriv n=%0d got %0d %0d exp %0d %0d", n_out, y[2], y[3], edi, edq));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
