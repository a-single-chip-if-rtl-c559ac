// lowrate_datapath: the multiplexed low-rate section of the FM/AM
// demodulator: the combs of the four sinc^3 paths, the multiplier and the
// adder that form the divider's numerator and denominator.
//
// Instead of twelve comb subtractors, four 24x24 multipliers and a tree of
// adders, one of each is used and stepped through the work once per output
// sample. After `start` (the decimated integrator values are in `taps`):
//
//   cycles  1..12  comb stage k of path p (p = I, Q, dI, dQ; k = 0..2):
//                  y = in - delay[p][k]; delay[p][k] <= in; the input of
//                  stage 0 is the tap, of the others the previous result.
//   cycles 13..16  the multiplier forms Q*dI, I*dQ, I*I and Q*Q in turn and
//                  the adder combines them:
//                    num = Q*dI - I*dQ    (proportional to sin(w) * |I+jQ|^2)
//                    den = I*I + Q*Q      (|I+jQ|^2, the squared AM envelope)
//
// `done` pulses for one clock when num, den and the filtered values are
// valid; they hold until the next run. A run takes 16 clocks, well inside
// the 64-clock output period. A `start` during a run is ignored (and
// flagged by an assertion).
//
// Sharing the low-rate combs, multiplier and adders follows the source
// design; the cycle schedule and the sign convention of num (positive for
// an IF above its nominal frequency, given the 1,0,-1,0 / 0,1,0,-1 mixing
// of the sampling filter) are this design's own choices.
module lowrate_datapath
  import fmam_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  taps_t taps,
  output logic  done,
  output num_t  num,
  output den_t  den,
  output taps_t filt      // comb outputs: filtered I, Q, dI, dQ
);

  typedef enum logic [1:0] {S_IDLE, S_COMB, S_MUL} state_e;

  state_e      state;
  logic [3:0]  step;               // 0..11 in S_COMB, 0..3 in S_MUL
  acc_t        dly [4][3];         // comb delay registers
  acc_t        res [4];            // comb results per path
  acc_t        work;               // running value through the comb stages
  taps_t       tin;                // captured taps

  // shared units
  path_e                   cpath;
  logic [1:0]              cstage;
  acc_t                    sub_a, sub_y;
  acc_t                    mul_a, mul_b;
  logic signed [PROD_W-1:0] prod;
  logic signed [NUM_W:0]   acc_r, add_a, add_b, add_y;
  logic                    add_sub;

  always_comb begin
    cpath  = path_e'(step / 4'd3);
    cstage = 2'(step % 4'd3);
    unique case (cpath)
      P_I:     sub_a = (cstage == 0) ? tin.i  : work;
      P_Q:     sub_a = (cstage == 0) ? tin.q  : work;
      P_DI:    sub_a = (cstage == 0) ? tin.di : work;
      default: sub_a = (cstage == 0) ? tin.dq : work;
    endcase
    sub_y = sub_a - dly[cpath][cstage];

    // multiplier operand select
    unique case (step[1:0])
      2'd0:    begin mul_a = res[P_Q]; mul_b = res[P_DI]; end
      2'd1:    begin mul_a = res[P_I]; mul_b = res[P_DQ]; end
      2'd2:    begin mul_a = res[P_I]; mul_b = res[P_I];  end
      default: begin mul_a = res[P_Q]; mul_b = res[P_Q];  end
    endcase
    prod = mul_a * mul_b;

    // one adder: acc +/- product (steps 1 and 3), product alone otherwise
    add_sub = (step[1:0] == 2'd1);
    add_a   = step[0] ? acc_r : '0;
    add_b   = (NUM_W+1)'(prod);
    add_y   = add_sub ? add_a - add_b : add_a + add_b;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      step  <= '0;
      done  <= 1'b0;
      work  <= '0;
      tin   <= '0;
      acc_r <= '0;
      num   <= '0;
      den   <= '0;
      filt  <= '0;
      for (int p = 0; p < 4; p++) begin
        res[p] <= '0;
        for (int k = 0; k < 3; k++) dly[p][k] <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            tin   <= taps;
            step  <= '0;
            state <= S_COMB;
          end
        end
        S_COMB: begin
          dly[cpath][cstage] <= sub_a;
          work <= sub_y;
          if (cstage == 2'd2) res[cpath] <= sub_y;
          if (step == 4'd11) begin
            step  <= '0;
            state <= S_MUL;
          end else begin
            step <= step + 1'b1;
          end
        end
        S_MUL: begin
          acc_r <= add_y;
          if (step[1:0] == 2'd1) num <= NUM_W'(add_y);
          if (step[1:0] == 2'd3) begin
            den   <= DEN_W'(add_y);
            filt  <= '{i: res[P_I], q: res[P_Q], di: res[P_DI], dq: res[P_DQ]};
            done  <= 1'b1;
            state <= S_IDLE;
          end
          step <= step + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A new decimated sample must not arrive while a run is in progress.
  assert property (@(posedge clk) disable iff (!rst_n) start |-> state == S_IDLE)
    else $error("lowrate_datapath: start while busy");

endmodule
