// tb_fifo_ta: fills the FIFO while the sink is stalled and checks that it
// takes exactly DEPTH tokens before it stops acknowledging, then drains it
// and checks order; finally streams random data with random source and sink
// timing and checks that every token arrives once, in order, and that the
// output data are stable from REQ_B rising until ACK_B falls.
`timescale 1ns/1ps
module tb_fifo_ta;
  localparam int W = 16, D = 8;
  logic por = 0, req_a = 0, ack_a, req_b, ack_b = 0;
  logic [W-1:0] data_in = '0, data_out;
  int checks = 0, failures = 0, accepted = 0;
  bit sink_on = 0;
  logic [W-1:0] expq [$];
  fifo_ta #(.DATA_W(W), .DEPTH(D)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send(input logic [W-1:0] v);
    data_in = v; expq.push_back(v);
    #0.1 req_a = 1;
    wait (ack_a);
    #0.1 req_a = 0;
    wait (!ack_a);
    accepted++;
  endtask

  // sink: broad four-phase, random delay; data must stay stable while acked
  initial begin
    logic [W-1:0] v;
    forever begin
      wait (sink_on && req_b);
      #($urandom_range(1, 20) * 0.1);
      v = data_out;
      check(expq.size() > 0 && v == expq[0], $sformatf("token %h, expected %h", v, expq.size() ? expq[0] : 'x));
      if (expq.size() > 0) void'(expq.pop_front());
      ack_b = 1;
      wait (!req_b);
      check(data_out == v, "output data changed before ACK_B fell");
      #($urandom_range(1, 10) * 0.1);
      ack_b = 0;
    end
  end

  initial begin
    #1 por = 1; #5 por = 0; #5;
    fork
      for (int i = 0; i <= D; i++) send(W'(16'h0a00 + i));
      #500;
    join_any
    check(accepted == D, $sformatf("stalled FIFO took %0d tokens (capacity %0d)", accepted, D));
    sink_on = 1;
    wait (accepted == D + 1);
    wait (expq.size() == 0);
    for (int i = 0; i < 100; i++) begin
      send(W'($urandom));
      #($urandom_range(0, 20) * 0.1);
    end
    wait (expq.size() == 0);
    #20;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #20000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
