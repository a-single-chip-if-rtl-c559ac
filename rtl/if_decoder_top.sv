// if_decoder_top: single-chip IF FM/AM decoder.
//
// The 10.7 MHz IF from a tuner chip is converted by an IF-sampling
// sigma-delta A/D converter and demodulated digitally:
//
//   if_in --> sampling_filter --I,Q--> sd_modulator --code--> fmam_demodulator
//             (42.8 MHz samples,       (2nd order, 17 levels,   (sinc^3 filters,
//              mix to baseband,         21.4 MHz, I and Q        quadricorrelator,
//              10.7 MHz I/Q)            on alternate ticks)      divider, sqrt)
//                                           ^      |
//                                           +-dwa_dem (element rotation)
//
// The sampling filter and the modulator are analog on the real chip and are
// behavioural models here; the DEM and the demodulator are synthesizable.
// FM and AM samples leave at 334.375 kHz for stereo and RDS decoding in
// software on an external DSP.
//
// Clocks: clk_if = 42.8 MHz (IF sampling) and clk = 21.4 MHz, with every
// rising edge of clk on a rising edge of clk_if. Both are supplied from
// outside. rst_n is an asynchronous active-low reset for both domains.
module if_decoder_top
  import fmam_pkg::*;
(
  input  logic               clk_if,
  input  logic               clk,
  input  logic               rst_n,
  input  logic signed [15:0] if_in,
  output logic               fm_valid,
  output fm_t                fm_out,
  output logic               fm_sat,
  output logic               am_valid,
  output am_t                am_out,
  output logic               dem_wrap
);

  logic signed [15:0] i_s, q_s;
  logic               sel_q;
  code_t              code;
  logic [N_ELEM-1:0]  dac_sel;

  sampling_filter #(.W(16)) u_sf (
    .clk_if, .rst_n, .if_in,
    .i_out (i_s),
    .q_out (q_s)
  );

  sd_modulator u_mod (
    .clk, .rst_n,
    .i_in (i_s),
    .q_in (q_s),
    .sel_q, .code, .dac_sel
  );

  dwa_dem #(.N(N_ELEM)) u_dem (
    .clk, .rst_n, .code, .sel_q, .dac_sel,
    .wrap (dem_wrap)
  );

  fmam_demodulator u_demod (
    .clk, .rst_n, .code, .sel_q,
    .fm_valid, .fm_out, .fm_sat,
    .am_valid, .am_out
  );

endmodule
