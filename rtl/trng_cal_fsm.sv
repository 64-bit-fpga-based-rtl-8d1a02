// trng_cal_fsm: auto-calibration controller of the TRNG.
//
// After reset the controller holds En at 1 (carry-chain selectors forced to
// "1111") and searches for the clock phase at which the sampler's raw bit T
// becomes random.  Each search step is:
//   CAL_STEP    - a one-cycle psen pulse asks the clock manager for one
//                 fine phase step, in the direction given by psincdec;
//   CAL_WAIT    - wait for the clock manager's psdone pulse;
//   CAL_OBSERVE - let SETTLE_CYCLES cycles pass (the sampler's two-stage
//                 pipeline still shows the old phase), then count the ones
//                 of T over OBS_CYCLES cycles.
// While no tap is near the clock edge, T is a constant (all four taps equal,
// T = 0), so the count is 0 or OBS_CYCLES and the controller steps again.
// When the count lies within [MIN_ONES, MAX_ONES] the phase is accepted:
// the controller enters CAL_RUN, drops En and from then on pulses ce once
// every WIDTH cycles, when the shift register holds WIDTH raw bits gathered
// since the previous pulse.  The phase is swept forward; after MAX_STEPS
// steps in one direction the sweep reverses.
//
// That an FSM watches T and drives the phase-shift inputs and En/CE follows
// the described design; the step/observe sequence, the ones-count window,
// the sweep reversal and all parameter values are this design's choices.
// Reset is synchronous, active low.
`timescale 1ns / 1ps
module trng_cal_fsm
  import trng_pkg::*;
#(
  parameter int unsigned WIDTH         = TRNG_WIDTH,
  parameter int unsigned OBS_CYCLES    = 32,
  parameter int unsigned MIN_ONES      = 4,
  parameter int unsigned MAX_ONES      = 28,
  parameter int unsigned SETTLE_CYCLES = 2,
  parameter int unsigned MAX_STEPS     = 255
) (
  input  logic clk,
  input  logic rst_n,      // synchronous, active low
  input  logic t,          // raw random bit from the sampler
  input  logic psdone,     // phase step finished (one-cycle pulse)
  output logic psen,       // phase step request (one-cycle pulse)
  output logic psincdec,   // 1: increase the phase, 0: decrease it
  output logic en,         // 1 while calibrating
  output logic ce,         // a full word is ready for post-processing
  output logic locked      // calibration finished
);

  localparam int unsigned OBS_TOTAL = SETTLE_CYCLES + OBS_CYCLES;
  localparam int unsigned OBS_W     = $clog2(OBS_TOTAL + 1);
  localparam int unsigned BIT_W     = $clog2(WIDTH);
  localparam int unsigned POS_W     = $clog2(MAX_STEPS + 1);

  cal_state_e       state;
  logic [OBS_W-1:0] obs_cnt;
  logic [OBS_W-1:0] ones;
  logic [BIT_W-1:0] bit_cnt;
  logic [POS_W-1:0] pos;       // steps taken in the current sweep direction
  logic             accept;

  // The count including the current cycle's bit, judged on the window's last cycle.
  always_comb begin
    logic [OBS_W-1:0] ones_now;
    ones_now = ones + OBS_W'(t);
    accept   = (ones_now >= OBS_W'(MIN_ONES)) && (ones_now <= OBS_W'(MAX_ONES));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= CAL_IDLE;
      obs_cnt  <= '0;
      ones     <= '0;
      bit_cnt  <= '0;
      pos      <= '0;
      psincdec <= 1'b1;
    end else begin
      unique case (state)
        CAL_IDLE: state <= CAL_STEP;
        CAL_STEP: begin
          state <= CAL_WAIT;
          if (pos == POS_W'(MAX_STEPS - 1)) begin
            pos      <= '0;
            psincdec <= ~psincdec;
          end else begin
            pos <= pos + 1'b1;
          end
        end
        CAL_WAIT: begin
          if (psdone) begin
            state   <= CAL_OBSERVE;
            obs_cnt <= '0;
            ones    <= '0;
          end
        end
        CAL_OBSERVE: begin
          obs_cnt <= obs_cnt + 1'b1;
          if (obs_cnt >= OBS_W'(SETTLE_CYCLES)) ones <= ones + OBS_W'(t);
          if (obs_cnt == OBS_W'(OBS_TOTAL - 1)) begin
            if (accept) begin
              state   <= CAL_RUN;
              bit_cnt <= '0;
            end else begin
              state <= CAL_STEP;
            end
          end
        end
        CAL_RUN: bit_cnt <= (bit_cnt == BIT_W'(WIDTH - 1)) ? '0 : bit_cnt + 1'b1;
        default: state <= CAL_IDLE;
      endcase
    end
  end

  assign psen   = (state == CAL_STEP);
  assign en     = (state != CAL_RUN);
  assign locked = (state == CAL_RUN);
  assign ce     = locked && (bit_cnt == BIT_W'(WIDTH - 1));

  // Rules of the phase-shift handshake and of the word strobe.
  a_psen_pulse : assert property (@(posedge clk) disable iff (!rst_n) psen |=> !psen);
  a_ce_locked  : assert property (@(posedge clk) disable iff (!rst_n) ce |-> locked);
  a_ce_spacing : assert property (@(posedge clk) disable iff (!rst_n) ce |=> !ce);

endmodule
