// tb_trng_stream: long-run bias measurement of the generator at its default
// size.
//
// After calibration the testbench collects RAW_BITS raw bits T (ten million,
// the length of the sequence used to judge the raw bit's balance) and every
// post-processed 64-bit word delivered meanwhile.  It checks that the ones
// fraction of T and of the output words lies within 50 % +/- TOL_PPM parts
// per million (0.2 %), that a word arrives every 64 cycles without a gap (the
// post-processing never slows the stream), and that no phase step is taken
// once locked.  Randomness here comes from the jitter of the behavioural
// clock-manager model, so the fractions say how well the sampler and the
// post-processing preserve it, not how a real device behaves.
`timescale 1ns / 1ps
module tb_trng_stream;

  localparam int unsigned W        = 64;
  localparam longint      WL       = longint'(W);
  localparam longint      RAW_BITS = 10_000_000;
  localparam longint      TOL_PPM  = 2_000;

  logic         clk_in = 0, rst_n = 0;
  logic         clk_out, psdone, psen, psincdec;
  logic [W-1:0] p_pp;
  logic         valid, locked, t_raw;
  int           phase;

  int     checks = 0, failures = 0;
  longint raw = 0, raw_ones = 0, words = 0, word_ones = 0, cycle = 0, last_valid = -1, gaps = 0;
  longint late_steps = 0;

  trng_top dut (.*);

  dcm_model #(.PERIOD(10.0), .INIT_DELAY(9.5), .STEP(0.025), .JITTER_PS(30), .PSDONE_LAT(4))
    u_dcm (.clkin(clk_in), .psclk(clk_in), .psen(psen), .psincdec(psincdec),
           .psdone(psdone), .clk0(clk_out), .phase(phase));

  always #5 clk_in = ~clk_in;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (int'(RAW_BITS) + 5000) @(posedge clk_in);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk_in) begin
    logic t_pre, valid_pre, locked_pre, psen_pre;
    logic [W-1:0] pp_pre;
    t_pre = t_raw; valid_pre = valid; locked_pre = locked; psen_pre = psen; pp_pre = p_pp;
    cycle++;
    if (rst_n && locked_pre) begin
      if (psen_pre) late_steps++;
      if (raw < RAW_BITS) begin
        raw++;
        raw_ones += t_pre;
        if (valid_pre) begin
          if (last_valid >= 0 && cycle - last_valid != WL) gaps++;
          last_valid = cycle;
          words++;
          word_ones += $countones(pp_pre);
        end
      end
    end
  end

  function automatic longint ppm_off(input longint ones, input longint total);
    longint d = 2 * ones - total;
    if (d < 0) d = -d;
    return (d * 500_000) / total;
  endfunction

  initial begin
    repeat (3) @(posedge clk_in);
    #1 rst_n = 1;
    wait (raw == RAW_BITS);
    @(posedge clk_in); #1;
    // The first word appears 65 cycles after lock, so the window holds one word
    // fewer than RAW_BITS / 64.
    check(words == RAW_BITS / WL - 1, $sformatf("%0d words for %0d raw bits", words, raw));
    check(gaps == 0, $sformatf("%0d gaps in the word stream", gaps));
    check(late_steps == 0, "phase step after lock");
    check(ppm_off(raw_ones, raw) <= TOL_PPM,
          $sformatf("raw ones fraction off 50%% by %0d ppm", ppm_off(raw_ones, raw)));
    check(ppm_off(word_ones, words * WL) <= TOL_PPM,
          $sformatf("output ones fraction off 50%% by %0d ppm", ppm_off(word_ones, words * WL)));
    $display("raw bits %0d, ones %0d (%0d ppm from 50%%)", raw, raw_ones, ppm_off(raw_ones, raw));
    $display("words %0d, output ones %0d of %0d (%0d ppm from 50%%)", words, word_ones, words * WL,
             ppm_off(word_ones, words * WL));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
