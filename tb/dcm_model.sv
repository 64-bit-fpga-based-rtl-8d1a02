// dcm_model: simulation-only behavioural model of an FPGA clock manager with
// dynamic phase shift, used by the top-level testbench.
//
// clk0 is a copy of clkin delayed by INIT_DELAY + phase * STEP (wrapped into
// one period), plus a fresh random jitter of up to +/-JITTER on every edge.
// The jitter stands in for the clock noise and flip-flop metastability that
// make the sampled value unpredictable when the two clock edges line up.
// A one-cycle psen pulse (sampled on psclk) moves the phase by one step, up
// when psincdec is 1 and down otherwise; psdone pulses for one psclk cycle
// PSDONE_LAT cycles later, when the new phase takes effect.  Not synthesizable.
`timescale 1ns / 1ps
module dcm_model #(
  parameter realtime PERIOD     = 10.0,
  parameter realtime INIT_DELAY = 9.5,
  parameter realtime STEP       = 0.025,
  parameter int      JITTER_PS  = 30,
  parameter int      PSDONE_LAT = 4
) (
  input  logic clkin,
  input  logic psclk,
  input  logic psen,
  input  logic psincdec,
  output logic psdone,
  output logic clk0,
  output int   phase        // current phase step, for the testbench
);

  int busy;
  logic dir;

  initial begin
    clk0   = 1'b0;
    psdone = 1'b0;
    phase  = 0;
    busy   = 0;
    dir    = 1'b1;
  end

  always @(posedge clkin) begin
    realtime d;
    int j;
    j = int'($urandom_range(2 * JITTER_PS, 0)) - JITTER_PS;
    d = INIT_DELAY + phase * STEP + j / 1000.0;
    while (d >= PERIOD) d = d - PERIOD;
    while (d < 0.0) d = d + PERIOD;
    fork
      begin
        automatic realtime dd = d;
        #(dd) clk0 = 1'b1;
        #(PERIOD / 2.0) clk0 = 1'b0;
      end
    join_none
  end

  always @(posedge psclk) begin
    psdone <= 1'b0;
    if (busy > 0) begin
      busy <= busy - 1;
      if (busy == 1) begin
        phase  <= dir ? phase + 1 : phase - 1;
        psdone <= 1'b1;
      end
    end else if (psen) begin
      busy <= PSDONE_LAT;
      dir  <= psincdec;
    end
  end

endmodule
