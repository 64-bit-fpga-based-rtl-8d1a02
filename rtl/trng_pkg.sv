// trng_pkg: constants and types shared by the carry-chain TRNG.
//
// The output word width (64 bits in the main configuration, 32 in the
// smaller variant) and the states of the calibration controller live here so
// that the sampler, the controller, the shift register and the
// post-processing agree on them.
`timescale 1ns / 1ps
package trng_pkg;

  // Width of the random word produced by the generator.
  localparam int unsigned TRNG_WIDTH = 64;

  // Number of carry-chain taps sampled by flip-flops (one CARRY4 element).
  localparam int unsigned CHAIN_TAPS = 4;

  // Selector value that forces every carry-chain stage to propagate.
  localparam logic [CHAIN_TAPS-1:0] SEL_ALL_PROPAGATE = '1;

  // States of the calibration controller.
  typedef enum logic [2:0] {
    CAL_IDLE    = 3'd0,  // after reset, before the first phase step
    CAL_STEP    = 3'd1,  // one-cycle phase-shift request to the clock manager
    CAL_WAIT    = 3'd2,  // waiting for the clock manager to finish the step
    CAL_OBSERVE = 3'd3,  // counting ones of the raw bit over a window
    CAL_RUN     = 3'd4   // calibrated: En released, words are produced
  } cal_state_e;

endpackage
