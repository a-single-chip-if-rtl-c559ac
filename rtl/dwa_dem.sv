// dwa_dem: dynamic element matching for the 16-element DAC of the
// 17-level sigma-delta modulator.
//
// The quantizer code (0..16) says how many unit elements are switched to the
// positive reference. Data-weighted averaging is used: the elements used are
// the next `code` elements after the ones used last time, so over time every
// element is used equally often and the element mismatch error is
// first-order shaped, pushed away from DC. Because one modulator is shared
// between the I and Q channels on alternate ticks, each channel keeps its own
// rotation pointer, so each channel sees its own shaped error sequence.
//
// Timing: dac_sel is combinational from code, sel_q and the pointer of that
// channel (the DAC must follow the quantizer inside the same modulator
// cycle). The pointer of the active channel advances by code at the rising
// clock edge. `wrap` is high when this tick's selection runs past element 15.
//
// The modulator is said to use "a version of DEM"; choosing data-weighted
// averaging and per-channel pointers is this design's own choice.
module dwa_dem
  import fmam_pkg::*;
#(
  parameter int unsigned N = N_ELEM
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [$clog2(N+1)-1:0] code,    // number of elements on, 0..N
  input  logic                   sel_q,   // 0: I tick, 1: Q tick
  output logic [N-1:0]           dac_sel, // element k on when bit k set
  output logic                   wrap
);

  localparam int unsigned PW = $clog2(N);

  logic [PW-1:0] ptr [2];
  logic [PW-1:0] cur;
  logic [2*N-1:0] therm2;
  logic [PW:0]    sum;

  always_comb begin
    cur = ptr[sel_q];
    // thermometer of `code` ones, rotated left by the pointer
    therm2 = '0;
    for (int k = 0; k < N; k++) therm2[k] = (k < int'(code));
    therm2 = therm2 << cur;
    dac_sel = therm2[N-1:0] | therm2[2*N-1:N];
    sum  = {1'b0, cur} + (PW+1)'(code);
    wrap = sum[PW];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr[0] <= '0;
      ptr[1] <= '0;
    end else begin
      ptr[sel_q] <= sum[PW-1:0];
    end
  end

endmodule
