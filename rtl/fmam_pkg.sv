// fmam_pkg: widths, types and constants shared by the IF FM/AM decoder.
//
// The digital back end runs on the 21.4 MHz modulator clock. The modulator
// alternates between the I and Q channels on successive ticks and produces a
// 17-level code (0..16, midscale 8). The sinc^3 decimation filters reduce the
// rate by DEC = 64 ticks, giving one FM/AM output every 64 clocks
// (334.375 kHz). All low-rate words are ACC_W = 24 bits wide, which is the
// width of the multiplier; numerator and denominator of the FM divider are
// full-width products.
package fmam_pkg;

  // Modulator code: 17 levels, 0..16, value = code - CODE_MID
  localparam int unsigned CODE_W   = 5;
  localparam int unsigned CODE_MID = 8;
  localparam int unsigned N_ELEM   = 16;   // unit DAC elements (17 levels)

  // Decimation filter
  localparam int unsigned DEC_DEFAULT = 64; // 21.4 MHz ticks per output sample
  localparam int unsigned ACC_W       = 24; // integrator / comb / multiplier width

  // Low-rate products
  localparam int unsigned PROD_W = 2 * ACC_W;   // 48
  localparam int unsigned NUM_W  = PROD_W + 1;  // Q*dI - I*dQ
  localparam int unsigned DEN_W  = PROD_W;      // I^2 + Q^2 (unsigned)

  // Outputs
  localparam int unsigned FM_W = 16;
  localparam int unsigned AM_W = PROD_W / 2;    // sqrt of DEN_W bits

  typedef logic [CODE_W-1:0]        code_t;
  typedef logic signed [ACC_W-1:0]  acc_t;
  typedef logic signed [NUM_W-1:0]  num_t;
  typedef logic [DEN_W-1:0]         den_t;
  typedef logic signed [FM_W-1:0]   fm_t;
  typedef logic [AM_W-1:0]          am_t;

  // The four decimated paths: filtered I and Q, and their derivatives
  // (taken before the last integrator).
  typedef struct packed {
    acc_t i;
    acc_t q;
    acc_t di;
    acc_t dq;
  } taps_t;

  // Path index used by the multiplexed low-rate datapath
  typedef enum logic [1:0] {
    P_I  = 2'd0,
    P_Q  = 2'd1,
    P_DI = 2'd2,
    P_DQ = 2'd3
  } path_e;

endpackage
