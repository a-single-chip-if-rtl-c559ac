// sampling_filter: behavioural model of the switched-capacitor IF sampling
// filter that turns the 10.7 MHz IF into I and Q samples at 10.7 MHz.
// This is an analog circuit; the model works on integer sample values.
//
// The IF is sampled at 42.8 MHz, four samples per IF period. The samples
// are multiplied by 1, 0, -1, 0 to form I and by 0, 1, 0, -1 to form Q, and
// each group of four is averaged. This mixes the IF down to baseband and
// reduces the rate to 10.7 MHz; averaging removes aliases at multiples of
// 10.7 MHz. The sum of the two non-zero products is halved, so a carrier of
// amplitude A gives an I/Q vector of magnitude A. A carrier above 10.7 MHz
// gives a vector that turns clockwise (I = cos(phi), Q = -sin(phi)).
//
// Interface and timing: one IF sample (signed) per clk_if rising edge.
// rst_n aligns the four-sample frame: the first sample after reset is
// phase 0. i_out and q_out change once per frame, on the clock edge that
// takes the fourth sample, and hold for four clk_if cycles.
//
// The sequences and rates follow the source design; the integer scaling
// and the frame alignment are this model's own.
module sampling_filter #(
  parameter int unsigned W = 16
) (
  input  logic                clk_if,
  input  logic                rst_n,
  input  logic signed [W-1:0] if_in,
  output logic signed [W-1:0] i_out,
  output logic signed [W-1:0] q_out
);

  logic [1:0]          phase;
  logic signed [W+1:0] acc_i, acc_q;
  logic signed [W+1:0] x, nxt_i, nxt_q;

  always_comb begin
    x     = (W+2)'(if_in);
    nxt_i = acc_i;
    nxt_q = acc_q;
    unique case (phase)
      2'd0: nxt_i = x;            // new frame: +1 for I
      2'd1: nxt_q = x;            // +1 for Q
      2'd2: nxt_i = acc_i - x;    // -1 for I
      default: nxt_q = acc_q - x; // -1 for Q
    endcase
  end

  always_ff @(posedge clk_if or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0;
      acc_i <= '0;
      acc_q <= '0;
      i_out <= '0;
      q_out <= '0;
    end else begin
      phase <= phase + 1'b1;
      acc_i <= nxt_i;
      acc_q <= nxt_q;
      if (phase == 2'd3) begin
        i_out <= W'(nxt_i >>> 1);
        q_out <= W'(nxt_q >>> 1);
      end
    end
  end

endmodule
