// tb_token_fork: checks that a token is offered to both sinks with the same
// data and that the source is acknowledged only after both sinks have
// acknowledged, and released only after both have released.
`timescale 1ns/1ps
module tb_token_fork;
  localparam int W = 8;
  logic por = 0, req_i = 0, ack_o0 = 0, ack_o1 = 0, ack_i, req_o0, req_o1;
  logic [W-1:0] data_i = '0, data_o;
  int checks = 0, failures = 0;
  token_fork #(.DATA_W(W)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1 por = 1; #5 por = 0; #2;
    for (int i = 0; i < 4; i++) begin
      data_i = W'(8'h40 + i); req_i = 1; #1;
      check(req_o0 && req_o1 && data_o == data_i, "token offered to both sinks");
      if (i % 2) ack_o1 = 1; else ack_o0 = 1;
      #1 check(!ack_i, "one sink is not enough");
      ack_o0 = 1; ack_o1 = 1;
      #1 check(ack_i, "acknowledged after both sinks");
      req_i = 0; #1;
      if (i % 2) ack_o0 = 0; else ack_o1 = 0;
      #1 check(ack_i, "held until both sinks release");
      ack_o0 = 0; ack_o1 = 0;
      #1 check(!ack_i, "released");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
