// trng_shift_reg: serial-to-parallel converter for the raw random bits.
//
// Every rising edge of clk the raw bit t is shifted in at bit 0 and the
// oldest bit leaves at the top, so p always holds the last WIDTH raw bits,
// newest in p[0].  The register is WIDTH bits wide (64 in the main
// configuration, 32 in the small one); the shift direction and the
// synchronous active-low reset are this design's choices.
`timescale 1ns / 1ps
module trng_shift_reg #(
  parameter int unsigned WIDTH = trng_pkg::TRNG_WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,  // synchronous, active low
  input  logic             t,      // raw random bit
  output logic [WIDTH-1:0] p       // last WIDTH raw bits, newest in bit 0
);

  always_ff @(posedge clk) begin
    if (!rst_n) p <= '0;
    else        p <= {p[WIDTH-2:0], t};
  end

endmodule
