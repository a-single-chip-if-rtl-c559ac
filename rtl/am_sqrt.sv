// am_sqrt: integer square root of I^2 + Q^2, the AM envelope output.
//
// The denominator of the FM divider is the squared magnitude of the
// filtered I/Q vector, so its square root is the demodulated AM signal.
// The root is computed bit-serially with the restoring digit-by-digit
// method: each clock brings down two radicand bits, tries the next root
// bit (trial = 4*root + 1 against the partial remainder) and keeps it if
// the remainder stays non-negative. The result is floor(sqrt(radicand)).
//
// Timing: `start` loads the radicand; `done` pulses IN_W/2 clocks after the
// start edge (24 clocks for 48 bits) with `root` held until the next result. A start
// while busy restarts.
//
// Using the square root of the denominator as the AM output follows the
// source design; the algorithm is this design's own choice.
module am_sqrt #(
  parameter int unsigned IN_W = 48
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [IN_W-1:0]     radicand,
  output logic                done,
  output logic [IN_W/2-1:0]   root
);

  localparam int unsigned R_W = IN_W / 2;
  localparam int unsigned CW  = $clog2(R_W + 1);

  logic [IN_W-1:0] rad;
  logic [R_W+1:0]  rem;
  logic [R_W+3:0]  rem_sh, trial;
  logic [R_W-1:0]  r;
  logic [CW-1:0]   cnt;
  logic            busy;
  logic            ge;

  always_comb begin
    rem_sh = {rem, rad[IN_W-1 -: 2]};
    trial  = {2'b00, r, 2'b01};
    ge     = rem_sh >= trial;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rad  <= '0;
      rem  <= '0;
      r    <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      root <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        rad  <= radicand;
        rem  <= '0;
        r    <= '0;
        cnt  <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        rem <= ge ? (R_W+2)'(rem_sh - trial) : (R_W+2)'(rem_sh);
        r   <= {r[R_W-2:0], ge};
        rad <= rad << 2;
        cnt <= cnt + 1'b1;
        if (cnt == CW'(R_W - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          root <= {r[R_W-2:0], ge};
        end
      end
    end
  end

endmodule
