// tb_am_sqrt: self-checking testbench for the bit-serial square root.
//
// Corner and random 48-bit radicands; each root r must satisfy
// r*r <= x < (r+1)*(r+1), and `done` must come 24 clocks after the
// start edge.
module tb_am_sqrt;
  logic        clk = 0, rst_n = 0, start = 0;
  logic [47:0] radicand;
  logic        done;
  logic [23:0] root;
  int checks = 0, failures = 0;

  am_sqrt #(.IN_W(48)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(logic [47:0] x);
    int lat;
    logic [49:0] r0, r1;
    @(negedge clk);
    radicand = x; start = 1;
    @(negedge clk);
    start = 0;
    lat = 0;
    while (!done) begin @(negedge clk); lat++; end
    r0 = 50'(root) * 50'(root);
    r1 = (50'(root) + 1) * (50'(root) + 1);
    checks++;
    if (!(r0 <= 50'(x) && 50'(x) < r1)) begin
      failures++;
      $display("FAIL sqrt(%0d) gave %0d", x, root);
    end
    checks++;
    if (lat != 24) begin
      failures++;
      $display("FAIL latency %0d", lat);
    end
  endtask

  initial begin
    radicand = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    one(48'd0); one(48'd1); one(48'd2); one(48'd3); one(48'd4);
    one(48'd99); one(48'd100); one(48'd101);
    one({48{1'b1}}); one(48'hFFFF_FFFF_FFFE);
    one(48'(64'd1 << 46));
    for (int n = 0; n < 300; n++) begin
      logic [47:0] x;
      x = {$urandom, $urandom} >> $urandom_range(0, 47);
      one(x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
