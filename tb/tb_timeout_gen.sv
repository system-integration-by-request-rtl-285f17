// tb_timeout_gen: runs a local clock and checks that ST rises after
// TIMEOUT_N falling edges without RST, not earlier, that RST pulses keep it
// low, that REQ_A passes to REQ_A1, and that STOPH becomes STOP only when
// REQ_A is not holding the arbiter.
`timescale 1ns/1ps
module tb_timeout_gen;
  localparam int N = 6;
  logic por = 0, lclk = 0, rst = 0, req_a = 0, stoph = 0, req_a1, st, stop;
  int checks = 0, failures = 0, falls = 0;
  timeout_gen #(.TIMEOUT_N(N)) dut (.*);
  always #5 lclk = !lclk;
  always @(negedge lclk) falls++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int f0;
    #1 por = 1; #6 por = 0;
    // keep resetting: no time-out
    repeat (10) begin @(posedge lclk); rst = 1; #2 rst = 0; end
    check(!st, "RST pulses prevent the time-out");
    @(posedge lclk); rst = 1; #2 rst = 0; f0 = falls;
    wait (st);
    check(falls - f0 == N, $sformatf("ST after %0d falling edges (expected %0d)", falls - f0, N));
    rst = 1; #2;
    check(!st, "RST clears ST");
    rst = 0;
    req_a = 1; #1;
    check(req_a1 && !stop, "REQ_A passes to REQ_A1");
    stoph = 1; #1;
    check(!stop, "STOPH waits while REQ_A holds the arbiter");
    req_a = 0; #1;
    check(stop && !req_a1, "STOP granted after REQ_A falls");
    req_a = 1; #1;
    check(!req_a1, "REQ_A waits while STOP is granted");
    stoph = 0; #1;
    check(req_a1 && !stop, "REQ_A1 granted after STOPH falls");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
