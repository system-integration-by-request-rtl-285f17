// tb_token_join: with EN_B high a token on one input alone must not pass;
// when the second arrives the joined token {A, B} is issued and both inputs
// are acknowledged. With EN_B low stream A passes alone and B is never
// acknowledged.
`timescale 1ns/1ps
module tb_token_join;
  localparam int W = 8;
  logic por = 0, en_b = 1, req_a = 0, req_b = 0, ack_o = 0, ack_a, ack_b, req_o;
  logic [W-1:0] data_a = '0, data_b = '0;
  logic [2*W-1:0] data_o;
  int checks = 0, failures = 0;
  token_join #(.W_A(W), .W_B(W)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1 por = 1; #5 por = 0; #2;
    for (int i = 0; i < 4; i++) begin
      data_a = W'(8'h10 + i); data_b = W'(8'h20 + i);
      if (i % 2) req_b = 1; else req_a = 1;
      #3 check(!req_o, "one input alone does not pass");
      req_a = 1; req_b = 1;
      #1 check(req_o && data_o == {data_a, data_b}, "joined token issued");
      ack_o = 1;
      #1 check(ack_a && ack_b, "both inputs acknowledged");
      req_a = 0; #2;
      check(req_o, "output request held until both inputs release");
      req_b = 0; #1;
      check(!req_o, "output request released");
      ack_o = 0; #1;
      check(!ack_a && !ack_b, "acknowledges released");
    end
    en_b = 0; #1;
    for (int i = 0; i < 3; i++) begin
      data_a = W'(8'h30 + i);
      req_a = 1; #1;
      check(req_o && data_o == {data_a, W'(0)}, "stream A passes alone");
      ack_o = 1; #1;
      check(ack_a && !ack_b, "only A acknowledged");
      req_a = 0; #1;
      check(!req_o, "released");
      ack_o = 0; #1;
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
