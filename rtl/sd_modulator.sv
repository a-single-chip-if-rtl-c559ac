// sd_modulator: behavioural model of the second-order, 17-level lowpass
// sigma-delta modulator, with its 16-element feedback DAC. This is an analog
// circuit (switched-capacitor integrators, flash quantizer, unit-element
// DAC); the model is a discrete-time integer model of it.
//
// One modulator serves both channels so that they match: it runs at
// 21.4 MHz and converts I on even ticks and Q on odd ticks (sel_q), keeping
// a separate pair of integrator states per channel. Per channel tick:
//
//   code = clamp(round(v2 / STEP) + 8, 0, 16)          flash quantizer
//   fb   = sum over elements k of (+/-) w_k             DAC, elements chosen
//                                                       by the DEM (dac_sel)
//   v1  <= v1 + u - fb ;  v2 <= v2 + (v1 + u - fb) - fb
//
// which gives Y = z^-1 U + (1 - z^-1)^2 E, second-order noise shaping. One
// quantizer step is STEP = 4096 input units, so the 16-bit input range
// +-32768 spans +-8 steps; inputs beyond about +-6 steps (+-24576)
// overload the loop. Each unit element weighs half a step (2048) plus a
// fixed error of up to +-MISMATCH_PPM parts per million, so that the
// effect of the DEM can be seen.
//
// Interface and timing: `code` and `sel_q` are combinational from the state
// of the active channel; `dac_sel` must come back in the same cycle; the
// state of that channel updates at the rising clock edge and sel_q toggles.
// i_in / q_in are sampled on their channel's tick.
//
// Order, level count, clock rate and the sharing between I and Q follow
// the source design; the loop structure, scaling and mismatch values are
// this model's own.
module sd_modulator
  import fmam_pkg::*;
#(
  parameter int MISMATCH_PPM = 2000
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic signed [15:0] i_in,
  input  logic signed [15:0] q_in,
  output logic               sel_q,
  output code_t              code,
  input  logic [N_ELEM-1:0]  dac_sel
);

  localparam longint STEP = 4096;
  localparam longint HALF = STEP / 2;

  longint v1 [2];
  longint v2 [2];
  longint u, fb, q, v1n;

  // fixed pseudo-random element error, within +-MISMATCH_PPM ppm of HALF
  function automatic longint elem_w(int k);
    longint e;
    e = longint'((k * 37 + 11) % 21) - 10;  // -10..10
    return HALF + (HALF * e * MISMATCH_PPM) / (10 * 1000000);
  endfunction

  always_comb begin
    u = sel_q ? longint'(q_in) : longint'(i_in);
    q = (v2[sel_q] + HALF) >>> 12;            // round(v2 / STEP)
    if (q > 8)  q = 8;
    if (q < -8) q = -8;
    code = code_t'(q + 8);
    fb = 0;
    for (int k = 0; k < N_ELEM; k++) fb += dac_sel[k] ? elem_w(k) : -elem_w(k);
    v1n = v1[sel_q] + u - fb;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1[0] <= 0; v1[1] <= 0;
      v2[0] <= 0; v2[1] <= 0;
      sel_q <= 1'b0;
    end else begin
      v1[sel_q] <= v1n;
      v2[sel_q] <= v2[sel_q] + v1n - fb;
      sel_q     <= ~sel_q;
    end
  end

endmodule
