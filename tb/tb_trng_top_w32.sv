// tb_trng_top_w32: end-to-end test of the generator in its 32-bit
// variant (32-bit words), with a behavioural clock manager providing clk_out.
//
// The clock-manager model starts with clk_out lagging clk_in by 9.5 ns of a
// 10 ns period and adds +/-30 ps of random jitter per edge.  The generator
// must step the phase until the clk_out edge falls among the carry-chain taps
// (about 15 steps of 25 ps), lock, and then deliver a word every 32 cycles.
// The testbench rebuilds every output word on its own from the raw bit T:
// its own 32-bit window of T, its own accumulator and bit flip, and compares
// it with p_pp whenever valid is 1.  It also checks the word spacing, the
// latency from lock to the first word and that no phase step follows the
// lock, and counts each mechanism: phase steps, lock, raw bits of both
// values after lock, accumulator wrap-around, and both bit-flip polarities.
`timescale 1ns / 1ps
module tb_trng_top_w32;

  localparam int unsigned W     = 32;
  localparam int          WORDS = 200;

  logic         clk_in = 0, rst_n = 0;
  logic         clk_out, psdone, psen, psincdec;
  logic [W-1:0] p_pp;
  logic         valid, locked, t_raw;
  int           phase;

  int checks = 0, failures = 0;
  int cycle = 0, lock_cycle = -1, last_valid = -1, words = 0;
  int steps = 0, ones = 0, zeros = 0, wraps = 0, flips = 0, noflips = 0;
  logic [W-1:0] sh = '0, sh_d1 = '0, sh_d2 = '0, acc = '0;

  trng_top #(.WIDTH(W)) dut (.*);

  dcm_model #(.PERIOD(10.0), .INIT_DELAY(9.5), .STEP(0.025), .JITTER_PS(30), .PSDONE_LAT(4))
    u_dcm (.clkin(clk_in), .psclk(clk_in), .psen(psen), .psincdec(psincdec),
           .psdone(psdone), .clk0(clk_out), .phase(phase));

  always #5 clk_in = ~clk_in;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL cycle %0d: %s", cycle, what);
    end
  endtask

  initial begin
    repeat (30000) @(posedge clk_in);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model, sampling the pre-edge values of the generator's outputs.
  always @(posedge clk_in) begin
    logic t_pre, valid_pre, locked_pre, psen_pre;
    logic [W-1:0] pp_pre;
    t_pre = t_raw; valid_pre = valid; locked_pre = locked; psen_pre = psen; pp_pre = p_pp;
    cycle++;
    if (rst_n) begin
      if (psen_pre) begin
        steps++;
        check(!locked_pre, "phase step after lock");
      end
      if (locked_pre) begin
        if (lock_cycle < 0) lock_cycle = cycle;
        if (t_pre) ones++; else zeros++;
      end
      if (valid_pre) begin
        logic [W:0] sum;
        logic [W-1:0] exp;
        // The word was accumulated two edges ago from the window of that time.
        sum = {1'b0, acc} + {1'b0, sh_d2};
        if (sum[W]) wraps++;
        acc = sum[W-1:0];
        if (acc[W-1]) flips++; else noflips++;
        exp = {acc[W-1], acc[W-1] ? ~acc[W-2:0] : acc[W-2:0]};
        check(pp_pre === exp, $sformatf("word %0d: p_pp=%h expected %h", words, pp_pre, exp));
        if (last_valid < 0) check(cycle - lock_cycle == int'(W) + 1, $sformatf("first word %0d cycles after lock", cycle - lock_cycle));
        else                check(cycle - last_valid == int'(W), $sformatf("word spacing %0d", cycle - last_valid));
        last_valid = cycle;
        words++;
      end
    end
    sh_d2 = sh_d1;
    sh_d1 = sh;
    sh    = {sh[W-2:0], t_pre};
  end

  initial begin
    repeat (3) @(posedge clk_in);
    #1 rst_n = 1;
    wait (words == WORDS);
    @(posedge clk_in); #1;
    check(steps > 0, "no phase step was taken");
    check(lock_cycle > 0, "never locked");
    check(ones > 0 && zeros > 0, $sformatf("raw bit constant after lock (%0d ones, %0d zeros)", ones, zeros));
    check(wraps > 0, "accumulator never wrapped");
    check(flips > 0 && noflips > 0, $sformatf("bit flip polarities: inverted %0d, passed %0d", flips, noflips));
    $display("phase steps=%0d (final phase %0d), lock at cycle %0d, words=%0d", steps, phase, lock_cycle, words);
    $display("raw bits after lock: %0d ones, %0d zeros; accumulator wraps=%0d; inverted=%0d passed=%0d",
             ones, zeros, wraps, flips, noflips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
