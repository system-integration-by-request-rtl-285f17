// tb_output_port: clocks the output port as the wrapper does (INT_CLK from
// the request, LCLKM low) and checks that a cycle with DATAV_OUT high sends a
// token (REQ_B, with ACK_INT and the clock-stretch request raised for the
// whole handshake) and that a cycle without valid data only returns ACK_INT.
`timescale 1ns/1ps
module tb_output_port;
  logic por = 0, lclkm = 0, req_int = 0, datav_out = 0, ack_b = 0;
  logic int_clk, req_b, ack_int, stretch;
  int checks = 0, failures = 0;
  output_port dut (.*);
  assign #(gals_pkg::T_TREE) int_clk = req_int | lclkm;   // clock tree delay, as in the wrapper

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1 por = 1; #5 por = 0; #2;
    check(!req_b && !ack_int && !stretch, "idle after reset");
    repeat (3) begin
      datav_out = 1; #1; req_int = 1; #2;
      check(req_b && ack_int && stretch, "valid cycle sends REQ_B and ACK_INT");
      req_int = 0; #2;
      check(req_b && ack_int, "REQ_B held until ACK_B");
      ack_b = 1; #2;
      check(!req_b && !ack_int && stretch, "ACK_B ends the request, stretch held");
      ack_b = 0; #2;
      check(!stretch, "stretch released");
    end
    datav_out = 0; #1; req_int = 1; #2;
    check(!req_b && ack_int, "empty cycle: ACK_INT only");
    req_int = 0; #2;
    check(!ack_int, "ACK_INT released");
    // local-clock cycle with data
    datav_out = 1; #1; lclkm = 1; #2;
    check(req_b && ack_int, "local cycle sends a token");
    lclkm = 0; #1; ack_b = 1; #2; ack_b = 0; #2;
    check(!req_b && !ack_int && !stretch, "handshake complete");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
