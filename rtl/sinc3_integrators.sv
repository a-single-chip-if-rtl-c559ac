// sinc3_integrators: high-rate half of the I and Q sinc^3 decimation
// filters, with the derivative taps used by the FM demodulator.
//
// A sinc^3 decimator is split across the decimating switch: three
// integrators run at the input rate and three differencing stages (combs)
// run at the output rate (see lowrate_datapath). The single modulator
// delivers I on even ticks and Q on odd ticks, and both integrator chains
// run on every 21.4 MHz tick, so both channels are decimated at the same
// instant.
//
// The filters are modified to restore the quadrature relationship. The
// sampling filter forms I from IF samples 0 and 2 of each group of four and
// Q from samples 1 and 3, so an I value stands for a moment half a tick
// after the tick that converts it, and a Q value for the moment of its own
// tick. The I filter therefore has an extra (1 + z^-1) factor, a linear-phase
// half-tick delay: its input is the last I code, held over the I tick and
// the following Q tick. The Q filter sees its code on Q ticks and zero on I
// ticks, doubled so that both channels have the same DC gain DEC^3 = 2^18.
// The zeros of the length-DEC sinc at half the tick rate remove the images
// of the zero-stuffing.
//
// The derivative of each channel is tapped before the last integrator. Run
// through the same three combs, that path is (1 - z^-DEC) times a
// second-order sinc kernel, a smoothed differentiator whose gain relative to
// the main path is (e^{jw} - 1) at tick frequency w (the tap is one tick
// ahead of the last integrator), whose imaginary part is sin(w).
//
// Integrators wrap modulo 2^ACC_W; the combs undo the wrap exactly as long
// as every true filter output fits in ACC_W bits (+-8 * 2^18 needs 22 bits).
//
// Interface and timing: `code` and `sel_q` come from the modulator each
// clock. Every DEC clocks the four integrator values are latched into `taps`
// and `dec_strobe` is high for one clock while they are valid. DEC must be
// even so both channels get the same number of samples.
//
// The split sinc^3 with a tap before the last integrator and the need to
// restore the I/Q timing follow the source design; the decimation ratio of
// 64 and the form of the modification are this design's own choices.
module sinc3_integrators
  import fmam_pkg::*;
#(
  parameter int unsigned DEC = DEC_DEFAULT
) (
  input  logic  clk,
  input  logic  rst_n,
  input  code_t code,
  input  logic  sel_q,
  output logic  dec_strobe,
  output taps_t taps
);

  localparam int unsigned CW = $clog2(DEC);

  acc_t x, xi, xq;
  acc_t i_last;     // I code of the current pair of ticks
  acc_t i1, i2, i3, q1, q2, q3;
  logic [CW-1:0] cnt;

  always_comb begin
    x  = acc_t'(code) - acc_t'(CODE_MID);
    xi = sel_q ? i_last : x;          // I held over two ticks: (1 + z^-1)
    xq = sel_q ? (x <<< 1) : '0;      // Q zero-stuffed, gain 2
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i1 <= '0; i2 <= '0; i3 <= '0;
      q1 <= '0; q2 <= '0; q3 <= '0;
      i_last     <= '0;
      cnt        <= '0;
      dec_strobe <= 1'b0;
      taps       <= '0;
    end else begin
      i1 <= i1 + xi;
      i2 <= i2 + i1;
      i3 <= i3 + i2;
      q1 <= q1 + xq;
      q2 <= q2 + q1;
      q3 <= q3 + q2;
      if (!sel_q) i_last <= x;
      dec_strobe <= 1'b0;
      if (cnt == CW'(DEC - 1)) begin
        cnt        <= '0;
        dec_strobe <= 1'b1;
        taps       <= '{i: i3, q: q3, di: i2, dq: q2};
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  initial begin
    assert (DEC % 2 == 0) else $error("DEC must be even");
  end

endmodule
