// tb_sampling_filter: self-checking testbench for the sampling filter model.
//
// Random IF samples are applied at the 42.8 MHz rate. For every frame of
// four samples x0..x3 the outputs must become I = (x0 - x2) / 2 and
// Q = (x1 - x3) / 2 (arithmetic shift) after the fourth sample, and hold
// for four clocks. A 10.7 MHz carrier with phase phi must give
// I = A cos(phi), Q = -A sin(phi) to within rounding.
module tb_sampling_filter;
  logic clk_if = 0, rst_n = 0;
  logic signed [15:0] if_in, i_out, q_out;
  int checks = 0, failures = 0;

  sampling_filter #(.W(16)) dut (.*);

  always #5 clk_if = ~clk_if;

  initial begin
    #2000000;
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

  initial begin
    int x [4];
    int ei, eq;
    real phi;
    if_in = 0;
    repeat (3) @(negedge clk_if);
    rst_n = 1;
    for (int f = 0; f < 400; f++) begin
      phi = 0.0157 * f;
      for (int p = 0; p < 4; p++) begin
        if (f < 200) x[p] = $urandom_range(0, 65535) - 32768;
        else x[p] = $rtoi(20000.0 * $cos(1.5707963267948966 * p + phi));
        if_in = 16'(x[p]);
        @(negedge clk_if);
        if (p < 3 && f > 0) check(i_out == 16'(ei) && q_out == 16'(eq), "hold");
      end
      ei = (x[0] - x[2]) >>> 1;
      eq = (x[1] - x[3]) >>> 1;
      check(int'(i_out) == ei && int'(q_out) == eq,
            $sformatf("f=%0d got %0d %0d exp %0d %0d", f, i_out, q_out, ei, eq));
      if (f >= 200) begin
        check(int'(i_out) - $rtoi(20000.0 * $cos(phi)) inside {[-2:2]} &&
              int'(q_out) + $rtoi(20000.0 * $sin(phi)) inside {[-2:2]},
              $sformatf("carrier f=%0d got %0d %0d", f, i_out, q_out));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
