// tb_trng_sampler: self-checking test of the metastability sampler.
//
// The testbench makes clk_out as a copy of clk_in delayed by D and checks the
// four sampled taps against the value each carry-chain output has at the
// clk_in edge: with all selectors forced to 1 (en = 1), tap i carries the
// inverse of clk_out as it was XOR_DELAY + i * MUX_DELAY earlier, so sweeping
// D across the clk_in edge in 10 ps steps moves the sampling point through
// the taps one by one.  T must be the XOR of the taps of the previous cycle
// and, with D far from the edge, stay 0.  With en = 0 the selectors follow
// the taps, and the taps are checked against the carry-chain equations with
// the previous taps as selectors.  Deterministic delays only: no jitter.
`timescale 1ns / 1ps
module tb_trng_sampler;

  localparam realtime PERIOD = 10.0;
  localparam realtime MUXD   = 0.040;   // defaults of trng_carry4
  localparam realtime XORD   = 0.020;

  logic       clk_in = 0, rst_n = 0, clk_out = 0, en = 1;
  logic [3:0] taps;
  logic       t;
  realtime    d = 2.5;
  int checks = 0, failures = 0, t_ones = 0, split = 0;

  trng_sampler dut (.*);

  always #(PERIOD / 2) clk_in = ~clk_in;

  always @(posedge clk_in) begin
    fork
      begin
        automatic realtime dd = d;
        #(dd) clk_out = 1'b1;
        #(PERIOD / 2) clk_out = 1'b0;
      end
    join_none
  end

  initial begin
    repeat (2000) @(posedge clk_in);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // Level of clk_out seen at the clk_in edge through a path of delay x.
  function automatic logic clk_out_at(input realtime x);
    realtime ph = -(x + d);
    while (ph < 0.0) ph += PERIOD;
    while (ph >= PERIOD) ph -= PERIOD;
    return ph < PERIOD / 2;
  endfunction

  initial begin
    logic [3:0] exp_taps, prev_taps;
    repeat (3) @(posedge clk_in);
    #1 rst_n = 1;
    // Sweep the clk_out edge through the sampling point.
    for (int k = 0; k < 24; k++) begin
      d = PERIOD - 0.005 - 0.010 * k;
      repeat (3) @(posedge clk_in);       // let the new delay reach the taps
      for (int n = 0; n < 3; n++) begin
        for (int i = 0; i < 4; i++) exp_taps[i] = ~clk_out_at(XORD + i * MUXD);
        @(posedge clk_in);
        prev_taps = taps;
        #1;
        check(taps === exp_taps, $sformatf("D=%0.3f taps=%b expected %b", d, taps, exp_taps));
        @(posedge clk_in);
        #1;
        check(t === ^prev_taps, $sformatf("T=%b expected XOR of %b", t, prev_taps));
        t_ones += t;
        if (taps != 4'b0000 && taps != 4'b1111) split++;
      end
    end
    check(split > 0 && t_ones > 0, $sformatf("edge never split the taps (split=%0d ones=%0d)", split, t_ones));
    // Far from the edge: all taps equal, T stays 0.
    d = 2.5;
    repeat (3) @(posedge clk_in);
    for (int n = 0; n < 20; n++) begin
      @(posedge clk_in); #1;
      check(taps === 4'b1111 && t === 1'b0, $sformatf("far from edge: taps=%b T=%b", taps, t));
    end
    // Feedback mode: selectors follow the taps.
    en = 0;
    for (int n = 0; n < 40; n++) begin
      logic c;
      d = (n % 2 != 0) ? 2.5 : 7.5;  // clk_out low / high at the sampling edge
      @(posedge clk_in);
      #1;
      prev_taps = taps;
      repeat (2) @(posedge clk_in);  // the new delay takes effect
      #1;
      prev_taps = taps;
      c = clk_out_at(0.0);
      for (int i = 0; i < 4; i++) begin
        exp_taps[i] = prev_taps[i] ^ c;
        c = prev_taps[i] ? c : 1'b1;
      end
      @(posedge clk_in);
      #1;
      check(taps === exp_taps, $sformatf("feedback: taps=%b expected %b (sel %b)", taps, exp_taps, prev_taps));
    end
    $display("taps split by the edge %0d times, T=1 %0d times", split, t_ones);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
