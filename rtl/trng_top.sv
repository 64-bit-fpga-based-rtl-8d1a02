// trng_top: carry-chain true random number generator with automatic clock
// phase calibration and on-chip post-processing.
//
// Randomness comes from sampling a clock edge with a flip-flop clocked by a
// second clock of the same frequency: when the two edges nearly coincide the
// flip-flop's setup/hold window is violated and its value is unpredictable.
// The FPGA clock manager (outside this module, see the clk_out/ps* ports)
// derives clk_out from clk_in with a phase that can be stepped at run time.
// Inside:
//   u_sampler  - carry chain driven by clk_out, four sampling flip-flops
//                clocked by clk_in, XOR and FF_XOR giving the raw bit T;
//   u_fsm      - steps the clock phase until T is random, then releases the
//                chain selectors (En) and strobes CE once per WIDTH bits;
//   u_shreg    - collects T into a WIDTH-bit word P;
//   u_post     - accumulates P on CE and applies the bit-flipping stage,
//                giving the random word p_pp with a one-cycle valid flag.
// One raw bit is produced per clk_in cycle, so a WIDTH-bit word leaves every
// WIDTH cycles, two cycles after its CE.  The block structure and WIDTH = 64
// follow the described design; reset, the valid/locked flags, the exported
// raw bit and the phase-shift handshake with psdone are this design's
// choices.  All logic runs on clk_in; reset is synchronous, active low.
`timescale 1ns / 1ps
module trng_top
  import trng_pkg::*;
#(
  parameter int unsigned WIDTH = TRNG_WIDTH
) (
  input  logic             clk_in,    // system clock, also the clock manager's input
  input  logic             rst_n,     // synchronous, active low
  // clock manager (dynamic phase shift) connections
  input  logic             clk_out,   // phase-shifted copy of clk_in
  input  logic             psdone,    // phase step finished
  output logic             psen,      // phase step request
  output logic             psincdec,  // phase step direction, 1 = increase
  // random words
  output logic [WIDTH-1:0] p_pp,      // post-processed random word
  output logic             valid,     // p_pp holds a new word this cycle
  output logic             locked,    // calibration finished
  output logic             t_raw      // raw random bit T, for health tests
);

  logic                  en;
  logic                  ce;
  logic [CHAIN_TAPS-1:0] taps;
  logic [WIDTH-1:0]      p;
  logic [WIDTH-1:0]      p_acc;

  trng_sampler u_sampler (
    .clk_in (clk_in),
    .rst_n  (rst_n),
    .clk_out(clk_out),
    .en     (en),
    .taps   (taps),
    .t      (t_raw)
  );

  trng_cal_fsm #(.WIDTH(WIDTH)) u_fsm (
    .clk     (clk_in),
    .rst_n   (rst_n),
    .t       (t_raw),
    .psdone  (psdone),
    .psen    (psen),
    .psincdec(psincdec),
    .en      (en),
    .ce      (ce),
    .locked  (locked)
  );

  trng_shift_reg #(.WIDTH(WIDTH)) u_shreg (
    .clk  (clk_in),
    .rst_n(rst_n),
    .t    (t_raw),
    .p    (p)
  );

  trng_postproc #(.WIDTH(WIDTH)) u_post (
    .clk  (clk_in),
    .rst_n(rst_n),
    .ce   (ce),
    .p    (p),
    .p_acc(p_acc),
    .p_pp (p_pp),
    .valid(valid)
  );

  // The sampled taps and the accumulator are observed only inside the blocks.
  logic unused_int;
  assign unused_int = ^{taps, p_acc};

endmodule
