// tb_trng_carry4: self-checking test of the carry-chain model.
//
// Drives random selector, data and carry inputs and compares o and co with
// the MUXCY/XORCY equations once the chain has settled.  Then, with all
// selectors at 1, toggles cyinit and checks that tap i changes only after
// XOR_DELAY + i * MUX_DELAY, i.e. that the taps form a tapped delay line.
`timescale 1ns / 1ps
module tb_trng_carry4;

  localparam realtime MUXD = 0.040;
  localparam realtime XORD = 0.020;

  logic       ci, cyinit;
  logic [3:0] di, s, o, co;
  int checks = 0, failures = 0;

  trng_carry4 #(.MUX_DELAY(MUXD), .XOR_DELAY(XORD)) dut (.*);

  task automatic check(input logic [3:0] got, input logic [3:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b (s=%b di=%b cyinit=%b ci=%b)", what, got, exp, s, di, cyinit, ci);
    end
  endtask

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] c;
    realtime t0;
    logic [3:0] exp_o, exp_co;
    ci = 0; cyinit = 0; di = 0; s = 0;
    #1;
    // Logic function.
    for (int n = 0; n < 200; n++) begin
      s      = 4'($urandom);
      di     = 4'($urandom);
      cyinit = 1'($urandom);
      ci     = (n % 4 == 0) ? 1'($urandom) : 1'b0;
      #0.5;
      c[0] = cyinit | ci;
      for (int i = 0; i < 4; i++) begin
        exp_o[i]  = s[i] ^ c[i];
        c[i+1]    = s[i] ? c[i] : di[i];
        exp_co[i] = c[i+1];
      end
      check(o, exp_o, "o");
      check(co, exp_co, "co");
    end
    // Delay-line behaviour with all selectors at 1.
    s = 4'b1111; di = 4'b1111; ci = 0; cyinit = 0;
    #1;
    check(o, 4'b1111, "o before edge");
    cyinit = 1;
    t0 = $realtime;
    for (int i = 0; i < 4; i++) begin
      // Just before tap i switches, taps below i have switched to 0.
      #(t0 + XORD + i * MUXD - 0.005 - $realtime);
      check(o, 4'b1111 << i, "tap delay (before)");
      #0.010;
      check(o, 4'b1111 << (i + 1), "tap delay (after)");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
