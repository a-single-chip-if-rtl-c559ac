// tb_dwa_dem: self-checking testbench for the data-weighted-averaging DEM.
//
// Random codes 0..16 on alternating I/Q ticks. A reference keeps one
// pointer per channel and checks, every tick, that exactly `code` elements
// are on, that they are the `code` elements starting at that channel's
// pointer (mod 16), and that `wrap` is set exactly when the run passes
// element 15. It also checks that every element is used equally often per
// channel over whole rotations.
module tb_dwa_dem;
  import fmam_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic [4:0]  code;
  logic        sel_q;
  logic [15:0] dac_sel;
  logic        wrap;
  int checks = 0, failures = 0;
  int ptr [2];
  int use_cnt [2][16];

  dwa_dem #(.N(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
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
    logic [15:0] exp_sel;
    int total [2];
    code = 0; sel_q = 0;
    ptr[0] = 0; ptr[1] = 0; total[0] = 0; total[1] = 0;
    foreach (use_cnt[c, k]) use_cnt[c][k] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      sel_q = n[0];
      code  = (n < 40) ? 5'(n % 17) : 5'($urandom_range(0, 16));
      #1;
      exp_sel = '0;
      for (int k = 0; k < int'(code); k++) exp_sel[(ptr[sel_q] + k) % 16] = 1'b1;
      check(dac_sel == exp_sel, $sformatf("n=%0d code=%0d ptr=%0d sel=%h exp=%h", n, code, ptr[sel_q], dac_sel, exp_sel));
      check($countones(dac_sel) == int'(code), "popcount");
      check(wrap == (ptr[sel_q] + int'(code) >= 16), $sformatf("wrap n=%0d", n));
      for (int k = 0; k < 16; k++) if (dac_sel[k]) use_cnt[sel_q][k]++;
      total[sel_q] += int'(code);
      ptr[sel_q] = (ptr[sel_q] + int'(code)) % 16;
    end
    // element usage equal to within one rotation
    for (int c = 0; c < 2; c++)
      for (int k = 0; k < 16; k++)
        check(use_cnt[c][k] >= total[c] / 16 - 1 && use_cnt[c][k] <= total[c] / 16 + 1,
              $sformatf("usage c=%0d k=%0d %0d of %0d", c, k, use_cnt[c][k], total[c]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
