// tb_trng_postproc: self-checking test of the accumulation and bit-flipping
// stages.
//
// Feeds random 64-bit words with a random clock enable and compares p_acc,
// p_pp and valid with a reference model: the accumulator adds p modulo 2^64
// when ce is 1; p_pp is the accumulator one cycle later with bits 62:0
// inverted when bit 63 is 1; valid follows ce by two cycles.  Counts how
// often the accumulator wrapped and how often each flip polarity was seen.
`timescale 1ns / 1ps
module tb_trng_postproc;

  localparam int unsigned W = 64;

  logic         clk = 0, rst_n = 0, ce = 0;
  logic [W-1:0] p = '0, p_acc, p_pp;
  logic         valid;
  logic [W-1:0] ref_acc, ref_pp;
  logic         ref_ce_q, ref_valid;
  int checks = 0, failures = 0, wraps = 0, flips = 0, noflips = 0;

  trng_postproc #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1;
    ref_acc = '0; ref_pp = '0; ref_ce_q = 0; ref_valid = 0;
    for (int n = 0; n < 1000; n++) begin
      logic [W:0] sum;
      ce = ($urandom_range(3, 0) == 0);
      p  = {$urandom, $urandom};
      @(posedge clk);
      // Reference update, same edge.
      ref_valid = ref_ce_q;
      ref_ce_q  = ce;
      ref_pp    = {ref_acc[W-1], ref_acc[W-1] ? ~ref_acc[W-2:0] : ref_acc[W-2:0]};
      if (ref_acc[W-1]) flips++; else noflips++;
      if (ce) begin
        sum = {1'b0, ref_acc} + {1'b0, p};
        if (sum[W]) wraps++;
        ref_acc = sum[W-1:0];
      end
      #1;
      check(p_acc, ref_acc, "p_acc");
      check(p_pp, ref_pp, "p_pp");
      check(W'(valid), W'(ref_valid), "valid");
    end
    checks++;
    if (wraps == 0 || flips == 0 || noflips == 0) begin
      failures++;
      $display("FAIL coverage: wraps=%0d flips=%0d noflips=%0d", wraps, flips, noflips);
    end
    $display("accumulator wraps=%0d, inverted=%0d, passed=%0d", wraps, flips, noflips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
