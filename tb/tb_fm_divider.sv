// tb_fm_divider: self-checking testbench for the FM divider.
//
// Reference: q = trunc(|num| * 2^15 / min(den >> 5, 2^39 - 1)), sign of num,
// clipped to +-32767 with sat set (also for a zero divisor). Worked out with
// 128-bit arithmetic. Every result must arrive 15 clocks after the start edge.
module tb_fm_divider;
  import fmam_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  num_t num;
  den_t den;
  logic done;
  logic signed [15:0] quot;
  logic sat;
  int checks = 0, failures = 0;
  int n_sat = 0;

  fm_divider dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(logic signed [48:0] n, logic [47:0] d);
    int lat;
    logic [127:0] mag, y, q;
    logic exp_sat;
    int exp_q;
    mag = n[48] ? 128'(-n) : 128'(n);
    y   = 128'(d >> 5);
    if (y > 128'((64'd1 << 39) - 1)) y = 128'((64'd1 << 39) - 1);
    exp_sat = (y == 0);
    if (!exp_sat) begin
      q = (mag << 15) / y;
      exp_sat = (q > 128'd32767);
    end
    exp_q = exp_sat ? 32767 : int'(q);
    if (n[48]) exp_q = -exp_q;
    @(negedge clk);
    num = n; den = d; start = 1;
    @(negedge clk);
    start = 0;
    lat = 0;
    while (!done) begin @(negedge clk); lat++; end
    checks++;
    if (int'(quot) != exp_q || sat != exp_sat) begin
      failures++;
      $display("FAIL num=%0d den=%0d got %0d/%0b exp %0d/%0b", n, d, quot, sat, exp_q, exp_sat);
    end
    checks++;
    if (lat != 15) begin
      failures++;
      $display("FAIL latency %0d", lat);
    end
    if (sat) n_sat++;
  endtask

  initial begin
    num = '0; den = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    one(49'sd0, 48'd1000);
    one(49'sd1000, 48'd0);
    one(49'sd12345678, 48'd1 << 40);
    one(-49'sd12345678, 48'd1 << 40);
    one(49'sd1 << 37, 48'd1 << 41);          // ratio 1/16 -> clipped
    one(49'sd1 << 33, 48'd1 << 41);          // ratio 2^-8 -> 4096
    one(-(49'sd1 << 33), 48'd1 << 41);
    one(49'sd1 << 30, {48{1'b1}});           // divisor saturated
    for (int k = 0; k < 400; k++) begin
      logic [47:0] d;
      logic signed [48:0] n;
      d = 48'({$urandom, $urandom} >> $urandom_range(6, 22));
      // numerator a random fraction (up to ~1/32) of the denominator
      n = 49'((64'(d) >> $urandom_range(5, 20)) * 64'($urandom_range(0, 1000)) / 1000);
      if ($urandom_range(0, 1)) n = -n;
      one(n, d);
    end
    checks++;
    if (n_sat < 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
