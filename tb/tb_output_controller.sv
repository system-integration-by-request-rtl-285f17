// tb_output_controller: walks the output controller through every arc of
// its burst-mode specification (data token, no-data cycle, data token that
// arrives before ACK_B has fallen) and checks REQ_B and ACK_INT after each
// input burst.
`timescale 1ns/1ps
module tb_output_controller;
  logic por = 1'b0, dov = 1'b0, donv = 1'b0, ack_b = 1'b0, req_b, ack_int;
  int checks = 0, failures = 0;
  output_controller dut (.*);

  task automatic expect2(input logic rb, input logic ai, input string what);
    #2;
    checks++;
    if (req_b !== rb || ack_int !== ai) begin
      failures++;
      $display("FAIL %s: req_b=%b ack_int=%b, expected %b %b", what, req_b, ack_int, rb, ai);
    end
  endtask

  initial begin
    #1 por = 1'b1; #5 por = 1'b0;
    expect2(0, 0, "idle after reset");
    dov = 1;               expect2(1, 1, "0->1 DOV+");
    ack_b = 1; dov = 0;    expect2(0, 0, "1->2 ACK_B+ DOV-");
    ack_b = 0; dov = 1;    expect2(1, 1, "2->1 ACK_B- DOV+");
    ack_b = 1; dov = 0;    expect2(0, 0, "1->2 again");
    dov = 1;               expect2(0, 0, "DOV+ while ACK_B high must wait");
    ack_b = 0;             expect2(1, 1, "then ACK_B- releases REQ_B");
    ack_b = 1; dov = 0;    expect2(0, 0, "1->2");
    ack_b = 0; donv = 1;   expect2(0, 1, "2->3 ACK_B- DONV+");
    donv = 0;              expect2(0, 0, "3->0 DONV-");
    donv = 1;              expect2(0, 1, "0->3 DONV+");
    donv = 0;              expect2(0, 0, "3->0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
