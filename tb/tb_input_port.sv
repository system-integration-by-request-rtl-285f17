// tb_input_port: checks the wrapper input port around its controller: in
// request mode REQ_A gives REQ_INT and ACK_A, a data-latch-enable pulse of
// about T_PULSE starts T_DLE after ACK_A and sets DATAV_IN; a local clock
// edge (LCLKM and INT_CLK high) clears DATAV_IN; in time-out mode the
// internal acknowledge is masked from the controller until the local clock
// has been paused (ACKEN), after which it acknowledges the sender.
`timescale 1ns/1ps
module tb_input_port;
  import gals_pkg::*;
  logic por = 0, req_a1 = 0, stop = 0, st = 0, acki1 = 0, ack_int = 0, lclkm = 0, int_clk = 0;
  logic req_int, ack_a, rst, reqi1, dle, datav_in;
  int checks = 0, failures = 0;
  realtime t_ack, t_dle_r, t_dle_f;
  input_port dut (.*);

  always @(posedge ack_a) t_ack = $realtime;
  always @(posedge dle) t_dle_r = $realtime;
  always @(negedge dle) t_dle_f = $realtime;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1 por = 1; #5 por = 0; #2;
    check(!datav_in && !req_int && !ack_a, "idle after reset");
    // request-driven token
    req_a1 = 1; #2;
    check(req_int && ack_a && rst, "REQ_INT, ACK_A and RST follow REQ_A");
    check(t_dle_r - t_ack > T_DLE - 0.01 && t_dle_r - t_ack < T_DLE + 0.01, "DLE starts T_DLE after ACK_A");
    check(t_dle_f - t_dle_r > T_PULSE - 0.01 && t_dle_f - t_dle_r < T_PULSE + 0.01, "DLE lasts T_PULSE");
    check(datav_in, "DATAV_IN set by DLE");
    int_clk = 1;                        // request clock edge: lclkm low, no clear
    ack_int = 1; req_a1 = 0; #2;
    check(!req_int && !ack_a, "ACK_INT and REQ_A falling complete the handshake");
    int_clk = 0; ack_int = 0; #2;
    check(datav_in, "DATAV_IN held without a local clock edge");
    lclkm = 1; int_clk = 1; #2; lclkm = 0; int_clk = 0; #2;
    check(!datav_in, "local clock edge clears DATAV_IN");
    // time-out mode: a request is handed over through the clock pause
    st = 1; #2;
    req_a1 = 1; #2;
    check(reqi1 && !ack_a, "REQI1 asks to pause the local clock");
    ack_int = 1; #1; ack_int = 0; #2;
    check(!ack_a, "ACK_INT is masked before ACKEN");
    acki1 = 1; #2; acki1 = 0; #2;
    check(!ack_a && !reqi1, "clock paused, waiting for the local cycle");
    ack_int = 1; #2; ack_int = 0; #2;
    check(ack_a && rst && datav_in, "local cycle acknowledges the sender");
    req_a1 = 0; st = 0; #2;
    check(!ack_a && !rst, "back to request mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
