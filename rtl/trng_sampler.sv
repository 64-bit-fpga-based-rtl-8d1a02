// trng_sampler: metastability sampler of the TRNG, producing one raw bit T
// per clk_in cycle.
//
// The phase-shifted clock clk_out drives the carry input (CYINIT) of a
// four-stage carry chain whose multiplexer data inputs are all 1.  The chain
// outputs O[3:0] are sampled by four flip-flops on the rising edge of clk_in.
// When the clock manager has placed the clk_out edge close to the clk_in
// edge, the four taps are caught on different sides of the transition (and
// in hardware one or more flip-flops go metastable), so their XOR, registered
// once more in FF_XOR, becomes the random bit T.  When no tap is near the
// edge all four flip-flops hold the same value and T stays 0.
//
// Selector mux: while en is 1 (auto-calibration) the selectors S[3:0] are
// forced to "1111" so that the chain is a pure delay line.  After calibration
// the selectors are driven by feedback from the sampled taps.  The carry
// chain, the all-ones data inputs, the four flip-flops, the XOR and FF_XOR
// follow the described structure; taking the feedback from the registered
// taps (rather than straight from O[3:0], which would close a combinational
// loop through the chain) and the synchronous active-low reset are this
// design's choices.
//
// Timing: T is the XOR of the taps sampled one clk_in edge earlier, so a
// change of clk_out phase shows in T two clk_in edges later.
`timescale 1ns / 1ps
module trng_sampler
  import trng_pkg::*;
(
  input  logic                  clk_in,   // system clock, samples the taps
  input  logic                  rst_n,    // synchronous, active low
  input  logic                  clk_out,  // phase-shifted clock from the clock manager
  input  logic                  en,       // 1: calibration, selectors forced to 1111
  output logic [CHAIN_TAPS-1:0] taps,     // the four sampled carry-chain outputs
  output logic                  t         // raw random bit (FF_XOR output)
);

  logic [CHAIN_TAPS-1:0] sel;
  logic [CHAIN_TAPS-1:0] chain_o;
  logic [CHAIN_TAPS-1:0] chain_co;

  // Selector multiplexer: "1111" during calibration, tap feedback afterwards.
  always_comb sel = en ? SEL_ALL_PROPAGATE : taps;

  trng_carry4 u_carry4 (
    .ci    (1'b0),
    .cyinit(clk_out),
    .di    (4'b1111),
    .s     (sel),
    .o     (chain_o),
    .co    (chain_co)
  );

  // Four sampling flip-flops, then the XOR and FF_XOR.
  always_ff @(posedge clk_in) begin
    if (!rst_n) begin
      taps <= '0;
      t    <= 1'b0;
    end else begin
      taps <= chain_o;
      t    <= ^taps;
    end
  end

  // The carry outputs of the chain are not used: only the sum taps are sampled.
  logic unused_co;
  assign unused_co = ^chain_co;

endmodule
