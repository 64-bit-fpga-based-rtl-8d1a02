// tb_trng_shift_reg: self-checking test of the raw-bit shift register.
//
// Shifts random bits in and compares p every cycle with a reference word
// built in the testbench (newest bit in bit 0), after a reset that must
// clear it.  Runs at the full 64-bit width.
`timescale 1ns / 1ps
module tb_trng_shift_reg;

  localparam int unsigned W = 64;

  logic         clk = 0, rst_n = 0, t = 0;
  logic [W-1:0] p, ref_p;
  int checks = 0, failures = 0;

  trng_shift_reg #(.WIDTH(W)) dut (.clk(clk), .rst_n(rst_n), .t(t), .p(p));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (p !== '0) begin failures++; $display("FAIL reset: p=%h", p); end
    rst_n = 1;
    ref_p = '0;
    for (int n = 0; n < 300; n++) begin
      t = 1'($urandom);
      @(posedge clk);
      ref_p = {ref_p[W-2:0], t};
      #1;
      checks++;
      if (p !== ref_p) begin
        failures++;
        $display("FAIL cycle %0d: p=%h expected %h", n, p, ref_p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
