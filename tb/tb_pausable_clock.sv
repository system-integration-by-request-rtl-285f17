// tb_pausable_clock: starts the ring, measures its period against
// 2*(HALF_NS + 3 gate delays), pauses it through each requester (no rising
// edge while the grant is held) and stops it with STOPI (LCLK stays low).
`timescale 1ns/1ps
module tb_pausable_clock;
  import gals_pkg::*;
  localparam realtime HALF = 6.0;
  logic reqi1 = 0, reqi2 = 0, stopi = 1, acki1, acki2, lclk;
  int checks = 0, failures = 0, rises = 0;
  realtime t_prev = 0, period = 0;
  pausable_clock #(.HALF_NS(HALF)) dut (.*);

  always @(posedge lclk) begin
    if (rises > 0) period = $realtime - t_prev;
    t_prev = $realtime;
    rises++;
  end
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int r0;
    #20;
    check(rises == 0 && !lclk, "stopped while STOPI is high");
    stopi = 0;
    #200;
    check(rises >= 14, $sformatf("ring runs: %0d edges", rises));
    check(period > 2.0 * HALF && period < 2.0 * HALF + 8.0 * T_GATE,
          $sformatf("period %0.2f ns", period));
    // pause through requester 1
    @(negedge lclk); reqi1 = 1;
    wait (acki1); r0 = rises;
    #50;
    check(rises == r0, "no edge while ACKI1 is granted");
    check(!lclk, "paused low");
    reqi1 = 0;
    #30;
    check(rises > r0, "resumes after release");
    // stretch through requester 2
    @(negedge lclk); reqi2 = 1;
    wait (acki2); r0 = rises;
    #50;
    check(rises == r0, "no edge while stretched");
    reqi2 = 0;
    #30;
    check(rises > r0, "resumes after stretch");
    // stop
    stopi = 1;
    #30; r0 = rises;
    #100;
    check(rises == r0 && !lclk, "stopped by STOPI");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
