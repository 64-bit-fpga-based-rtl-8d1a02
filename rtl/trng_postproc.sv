// trng_postproc: on-chip post-processing of the random words.
//
// Two register stages, both clocked by clk:
//   Accumulation - when ce is 1, the WIDTH-bit input word p is added to the
//                  accumulator register (modulo 2^WIDTH): p_acc <= p_acc + p.
//   Bit-flipping - every cycle the accumulator is copied to the output
//                  register; its top bit p_acc[WIDTH-1] decides whether the
//                  lower WIDTH-1 bits pass unchanged (0) or inverted (1).
//                  The top bit itself is passed unchanged.
// Both stages work at the word rate set by ce, so post-processing never
// slows the generator down.
//
// valid is 1 for the one cycle in which p_pp first shows the result of a
// word accepted with ce, two clk edges after that ce.  The adder, the
// clock-enabled accumulator and the bit-flipping stage follow the described
// structure; keeping the top bit unchanged, the valid flag and the
// synchronous active-low reset (clearing the accumulator) are this design's
// choices.
`timescale 1ns / 1ps
module trng_postproc #(
  parameter int unsigned WIDTH = trng_pkg::TRNG_WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,  // synchronous, active low
  input  logic             ce,     // accept p into the accumulator
  input  logic [WIDTH-1:0] p,      // word from the shift register
  output logic [WIDTH-1:0] p_acc,  // accumulator
  output logic [WIDTH-1:0] p_pp,   // post-processed random word
  output logic             valid   // p_pp holds a new word this cycle
);

  logic             ce_q;
  logic [WIDTH-1:0] flipped;

  always_ff @(posedge clk) begin
    if (!rst_n)  p_acc <= '0;
    else if (ce) p_acc <= p_acc + p;
  end

  always_comb begin
    flipped[WIDTH-1]   = p_acc[WIDTH-1];
    flipped[WIDTH-2:0] = p_acc[WIDTH-1] ? ~p_acc[WIDTH-2:0] : p_acc[WIDTH-2:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      p_pp  <= '0;
      ce_q  <= 1'b0;
      valid <= 1'b0;
    end else begin
      p_pp  <= flipped;
      ce_q  <= ce;
      valid <= ce_q;
    end
  end

endmodule
