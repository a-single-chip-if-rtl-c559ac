// fmam_demodulator: the digital FM/AM decoder that follows the
// sigma-delta modulator.
//
// It is a quadricorrelator: with the filtered baseband vector I + jQ and its
// derivative dI + j dQ, the instantaneous frequency is
// (Q*dI - I*dQ) / (I^2 + Q^2) and the AM envelope is sqrt(I^2 + Q^2). No
// phase-locked loop, look-up table or amplitude control is needed, and the
// ratio suppresses amplitude variations of the carrier.
//
//   sinc3_integrators   21.4 MHz: integrators of the I/Q sinc^3 filters and
//                       the derivative taps; decimation by 64
//   lowrate_datapath    shared comb subtractor, multiplier and adder:
//                       num = Q*dI - I*dQ, den = I^2 + Q^2
//   fm_divider          fm_out = num * 2^20 / den (39-bit divisor)
//   am_sqrt             am_out = sqrt(den)
//
// Interface and timing: one modulator code per 21.4 MHz clock, with sel_q
// saying which channel it belongs to. One FM and one AM sample come out
// every DEC = 64 clocks (334.375 kHz); fm_valid and am_valid pulse for one
// clock each. From a decimation instant, fm_valid follows after 1 + 16 + 15
// clocks and am_valid after 1 + 16 + 24 clocks. fm_sat marks a clipped FM
// sample.
module fmam_demodulator
  import fmam_pkg::*;
#(
  parameter int unsigned DEC = DEC_DEFAULT
) (
  input  logic  clk,
  input  logic  rst_n,
  input  code_t code,
  input  logic  sel_q,
  output logic  fm_valid,
  output fm_t   fm_out,
  output logic  fm_sat,
  output logic  am_valid,
  output am_t   am_out
);

  logic  dec_strobe;
  taps_t taps;
  logic  lr_done;
  num_t  num;
  den_t  den;
  taps_t filt;

  sinc3_integrators #(.DEC(DEC)) u_integ (
    .clk, .rst_n, .code, .sel_q,
    .dec_strobe, .taps
  );

  lowrate_datapath u_lowrate (
    .clk, .rst_n,
    .start (dec_strobe),
    .taps,
    .done  (lr_done),
    .num, .den, .filt
  );

  fm_divider u_div (
    .clk, .rst_n,
    .start (lr_done),
    .num, .den,
    .done  (fm_valid),
    .quot  (fm_out),
    .sat   (fm_sat)
  );

  am_sqrt #(.IN_W(DEN_W)) u_sqrt (
    .clk, .rst_n,
    .start    (lr_done),
    .radicand (den),
    .done     (am_valid),
    .root     (am_out)
  );

endmodule
