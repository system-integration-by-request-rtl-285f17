// tb_input_controller: drives the input controller through the arcs of its
// burst-mode specification: request-driven handshakes (0-1-2-1-2), time-out
// (2-3), transitional hand-over (3-5-6-7-8-9-1) and stop (9-3-4-0), and
// checks all outputs after each input burst.
`timescale 1ns/1ps
module tb_input_controller;
  logic por = 1'b0, req_a1 = 0, ackc = 0, st = 0, stop = 0, acki1 = 0;
  logic req_int, ack_a, rst, reqi1, acken;
  int checks = 0, failures = 0;
  input_controller dut (.*);

  // expected {req_int, ack_a, rst, reqi1, acken}
  task automatic expect5(input logic [4:0] e, input string what);
    #2;
    checks++;
    if ({req_int, ack_a, rst, reqi1, acken} !== e) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, {req_int, ack_a, rst, reqi1, acken}, e);
    end
  endtask

  initial begin
    #1 por = 1'b1; #5 por = 1'b0;
    expect5(5'b00000, "state 0");
    req_a1 = 1;              expect5(5'b11100, "0->1");
    ackc = 1; req_a1 = 0;    expect5(5'b00000, "1->2");
    ackc = 0; req_a1 = 1;    expect5(5'b11100, "2->1");
    ackc = 1; req_a1 = 0;    expect5(5'b00000, "1->2");
    ackc = 0; st = 1;        expect5(5'b00000, "2->3 time-out");
    req_a1 = 1;              expect5(5'b00010, "3->5 REQI1+");
    acki1 = 1;               expect5(5'b00001, "5->6 ACKEN+ REQI1-");
    acki1 = 0; ackc = 1;     expect5(5'b00001, "6->7");
    ackc = 0;                expect5(5'b01101, "7->8 ACK_A+ RST+");
    req_a1 = 0; st = 0;      expect5(5'b00000, "8->9");
    req_a1 = 1;              expect5(5'b11100, "9->1");
    ackc = 1; req_a1 = 0;    expect5(5'b00000, "1->2");
    ackc = 0; st = 1;        expect5(5'b00000, "2->3");
    stop = 1;                expect5(5'b00100, "3->4 STOP+ RST+");
    stop = 0; st = 0;        expect5(5'b00000, "4->0");
    req_a1 = 1;              expect5(5'b11100, "0->1 after stop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
