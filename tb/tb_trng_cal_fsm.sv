// tb_trng_cal_fsm: self-checking test of the auto-calibration controller.
//
// The testbench stands in for the clock manager and the sampler.  It keeps a
// phase position that moves one step, PS_LAT cycles after each psen pulse,
// in the direction of psincdec, and answers with a psdone pulse.  The raw bit
// is 0 below phase TARGET, 1 above it, and random at TARGET, but only once
// the sweep has turned round (before that it is 0 there as well).  With
// MAX_STEPS = 8 and TARGET = 5 the controller must therefore sweep up eight
// steps, reverse, and lock after three steps down: eleven steps in all.
// Checked: the step count and directions, the phase staying in range, the
// length of each observation window, En/locked, no phase request after lock,
// and a ce pulse exactly every WIDTH cycles after lock, the first in the
// WIDTH-th locked cycle.
`timescale 1ns / 1ps
module tb_trng_cal_fsm;

  localparam int unsigned W         = 64;
  localparam int unsigned OBS       = 32;
  localparam int unsigned SETTLE    = 2;
  localparam int unsigned MAXS      = 8;
  localparam int          TARGET    = 5;
  localparam int          PS_LAT    = 3;
  localparam int          EXP_STEPS = 11;

  logic clk = 0, rst_n = 0, t = 0, psdone = 0;
  logic psen, psincdec, en, ce, locked;
  int checks = 0, failures = 0;
  int phase = 0, busy = 0, steps = 0, ups = 0, downs = 0;
  bit dir = 1, opened = 0;
  int cycle = 0, done_cycle = -1, lock_cycle = -1, last_ce = -1, ces = 0;

  trng_cal_fsm #(.WIDTH(W), .OBS_CYCLES(OBS), .MIN_ONES(4), .MAX_ONES(28),
                 .SETTLE_CYCLES(SETTLE), .MAX_STEPS(MAXS)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL cycle %0d: %s", cycle, what);
    end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Clock-manager and sampler stand-in, sampled on the rising edge and
  // driven just after it.
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (psen) begin
        check(busy == 0, "psen while a step is in progress");
        check(!locked, "psen after lock");
        check(done_cycle < 0 || cycle - done_cycle == int'(OBS + SETTLE + 1),
              $sformatf("observation window of %0d cycles", cycle - done_cycle));
        steps++;
        if (psincdec) ups++; else downs++;
        if (!psincdec) opened = 1;
        dir  = psincdec;
        busy = PS_LAT;
      end else if (busy > 0) begin
        busy--;
        if (busy == 0) begin
          phase = dir ? phase + 1 : phase - 1;
          check(phase >= 0 && phase <= int'(MAXS), $sformatf("phase %0d out of range", phase));
        end
      end
      if (ce) begin
        ces++;
        check(locked, "ce before lock");
        if (last_ce < 0) check(cycle - lock_cycle == int'(W) - 1, $sformatf("first ce %0d cycles after lock", cycle - lock_cycle));
        else             check(cycle - last_ce == int'(W), $sformatf("ce spacing %0d", cycle - last_ce));
        last_ce = cycle;
      end
      check(en == !locked, "en must be the inverse of locked");
      if (locked && lock_cycle < 0) lock_cycle = cycle;
    end
    #1;
    psdone = rst_n && psen === 1'b0 && busy == 0 && phase_changed();
    if (psdone) done_cycle = cycle;
    if (phase < TARGET)                  t = 1'b0;
    else if (phase > TARGET)             t = 1'b1;
    else                                 t = opened ? 1'($urandom) : 1'b0;
  end

  int last_phase = 0;
  function automatic bit phase_changed();
    bit c = (phase != last_phase);
    last_phase = phase;
    return c;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    #2 rst_n = 1;
    check(en && !locked, "calibrating after reset");
    wait (ces == 6);
    @(posedge clk); #2;
    check(steps == EXP_STEPS, $sformatf("%0d phase steps, expected %0d", steps, EXP_STEPS));
    check(ups == int'(MAXS) && downs == EXP_STEPS - int'(MAXS), $sformatf("%0d up / %0d down", ups, downs));
    check(phase == TARGET, $sformatf("locked at phase %0d", phase));
    $display("steps=%0d (up %0d, down %0d), lock after %0d cycles, ce pulses=%0d", steps, ups, downs, lock_cycle, ces);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
