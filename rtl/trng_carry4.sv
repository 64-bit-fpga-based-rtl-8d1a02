// trng_carry4: behavioural model of a four-stage FPGA carry-chain element
// (CARRY4), used here as a tapped delay line.
//
// Each stage i is a carry multiplexer and an XOR:
//   carry[i+1] = s[i] ? carry[i] : di[i]      (MUXCY)
//   o[i]       = s[i] ^ carry[i]              (XORCY)
// with carry[0] = cyinit | ci.  With every selector at 1 the chain passes
// its carry input straight through, so o[3:0] are inverted copies of cyinit,
// each one multiplexer delay (MUX_DELAY) later than the one before.  In the
// generator cyinit is the phase-shifted clock clk_out, and the four outputs
// reach their sampling flip-flops at slightly different moments, so a small
// change of the clock phase moves the sampling point across the taps.
//
// This is a model of a vendor primitive: the stage logic is the primitive's
// logic function, and the delays (MUX_DELAY per multiplexer, XOR_DELAY per
// XOR) stand for its wiring and only have an effect in simulation; synthesis
// ignores them and maps the file to plain logic.  The delay values are this
// model's choice, not device data.  Purely combinational, no clock.
`timescale 1ns / 1ps
module trng_carry4 #(
  parameter realtime MUX_DELAY = 0.040,  // ns per carry multiplexer
  parameter realtime XOR_DELAY = 0.020   // ns per output XOR
) (
  input  logic       ci,      // carry in from a previous element (unused: tie 0)
  input  logic       cyinit,  // carry initialisation input
  input  logic [3:0] di,      // data inputs of the carry multiplexers
  input  logic [3:0] s,       // selectors of the carry multiplexers
  output logic [3:0] o,       // sum outputs
  output logic [3:0] co       // carry outputs of each stage
);

  logic [4:0] carry;

  assign carry[0] = cyinit | ci;

  for (genvar i = 0; i < 4; i++) begin : g_stage
    assign #(MUX_DELAY) carry[i+1] = s[i] ? carry[i] : di[i];
    assign #(XOR_DELAY) o[i]       = s[i] ^ carry[i];
  end

  assign co = carry[4:1];

endmodule
