// fm_divider: the divider that turns the quadricorrelator's numerator and
// denominator into the FM output sample.
//
//   quot = num * 2^FM_SHIFT / den, clipped to +-(2^(Q_W-1) - 1)
//
// With num = Q*dI - I*dQ and den = I^2 + Q^2 the ratio num/den equals
// sin(w), w being the instantaneous frequency offset in radians per
// 21.4 MHz tick, so the output is 2^20 * sin(2*pi*f / 21.4 MHz): about
// 3.25 Hz per LSB, +-32767 spanning about +-104 kHz.
//
// The numerator is far smaller than the denominator, so both are rescaled
// before dividing: the denominator is scaled down to a DIV_W = 39-bit divisor
// (den >> DEN_DROP, saturated), and the magnitude of the numerator is
// scaled up by 2^(FM_SHIFT - DEN_DROP). A sequential restoring divider with
// a (DIV_W+1)-bit partial remainder then yields one magnitude bit per clock,
// Q_W-1 bits in all; the sign is applied at the end (truncation toward zero).
// If the quotient would not fit, or the divisor is zero, the result is
// clipped to full scale with the numerator's sign and `sat` is set.
//
// Timing: `start` loads num and den; `done` pulses Q_W-1 clocks after the
// start edge (15 clocks, also when clipped, so the output rate stays even), with quot and sat held until the next start. A start while
// busy restarts the division.
//
// The 39-bit divider width and 16-bit result follow the source design; the
// restoring algorithm, the scale factors and the clipping are this design's
// own choices.
module fm_divider
  import fmam_pkg::*;
#(
  parameter int unsigned DIV_W    = 39,
  parameter int unsigned Q_W      = FM_W,
  parameter int unsigned FM_SHIFT = 20,
  parameter int unsigned DEN_DROP = 5
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  num_t                  num,
  input  den_t                  den,
  output logic                  done,
  output logic signed [Q_W-1:0] quot,
  output logic                  sat
);

  localparam int unsigned UP  = FM_SHIFT - DEN_DROP;  // numerator scale-up
  localparam int unsigned QM  = Q_W - 1;              // magnitude bits
  localparam int unsigned X_W = NUM_W - 1 + UP;       // scaled |num|
  localparam int unsigned CW  = $clog2(QM + 1);

  logic [NUM_W-2:0] mag;
  logic [X_W-1:0]   x_full;
  logic [DEN_W-1:0] den_sh;
  logic [DIV_W-1:0] y_div;
  logic             ovf;

  logic [DIV_W-1:0] y_r;
  logic [DIV_W:0]   rem;
  logic [QM-1:0]    xlo;     // dividend bits still to bring down
  logic [QM-1:0]    q_r;
  logic             neg_r;
  logic             ovf_r;    // result will be clipped
  logic             busy;
  logic [CW-1:0]    cnt;
  logic [DIV_W:0]   rem_sh;
  logic             ge;

  always_comb begin
    mag    = num[NUM_W-1] ? (NUM_W-1)'(-num) : num[NUM_W-2:0];
    x_full = X_W'(mag) << UP;
    den_sh = den >> DEN_DROP;
    y_div  = (den_sh >= DEN_W'({DIV_W{1'b1}})) ? {DIV_W{1'b1}} : den_sh[DIV_W-1:0];
    // quotient fits in QM bits iff x >> QM < y
    ovf    = (y_div == '0) || ((x_full >> QM) >= X_W'(y_div));
    rem_sh = {rem[DIV_W-1:0], xlo[QM-1]};
    ge     = rem_sh >= {1'b0, y_r};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      cnt   <= '0;
      rem   <= '0;
      xlo   <= '0;
      q_r   <= '0;
      y_r   <= '0;
      neg_r <= 1'b0;
      ovf_r <= 1'b0;
      quot  <= '0;
      sat   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        neg_r <= num[NUM_W-1];
        y_r   <= y_div;
        rem   <= (DIV_W+1)'(x_full >> QM);
        xlo   <= x_full[QM-1:0];
        q_r   <= '0;
        cnt   <= '0;
        ovf_r <= ovf;
        busy  <= 1'b1;
      end else if (busy) begin
        rem <= ge ? rem_sh - {1'b0, y_r} : rem_sh;
        xlo <= xlo << 1;
        q_r <= {q_r[QM-2:0], ge};
        cnt <= cnt + 1'b1;
        if (cnt == CW'(QM - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          sat  <= ovf_r;
          if (ovf_r)
            quot <= neg_r ? -$signed({1'b0, {QM{1'b1}}}) : $signed({1'b0, {QM{1'b1}}});
          else
            quot <= neg_r ? -$signed({1'b0, q_r[QM-2:0], ge}) : $signed({1'b0, q_r[QM-2:0], ge});
        end
      end
    end
  end

endmodule
