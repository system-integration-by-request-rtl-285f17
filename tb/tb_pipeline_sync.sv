// tb_pipeline_sync: a fast asynchronous writer pushes words into the
// synchroniser FIFO while a slow clock reads one word per cycle; checks that
// every word arrives once and in order, that the writer is held off when
// the FIFO is full, and that the reader sees nothing after it is empty.
`timescale 1ns/1ps
module tb_pipeline_sync;
  localparam int W = 16, D = 4, N = 40;
  logic por = 0, req_a = 0, ack_a, clk = 0, dout_v;
  logic [W-1:0] data_in = '0, dout;
  int checks = 0, failures = 0, nout = 0;
  realtime t_max = 0;
  logic [W-1:0] expq [$];
  pipeline_sync #(.DATA_W(W), .DEPTH(D)) dut (.*);
  always #6.25 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (dout_v && !por) begin
    check(expq.size() > 0 && dout == expq[0], $sformatf("word %0d = %h", nout, dout));
    if (expq.size() > 0) void'(expq.pop_front());
    nout++;
  end

  initial begin
    realtime t0;
    #1 por = 1; #12 por = 0; #5;
    for (int i = 0; i < N; i++) begin
      t0 = $realtime;
      data_in = W'(16'h5000 + i); expq.push_back(data_in);
      #0.1 req_a = 1;
      wait (ack_a);
      #0.1 req_a = 0;
      wait (!ack_a);
      if ($realtime - t0 > t_max) t_max = $realtime - t0;
    end
    repeat (10) @(posedge clk);
    check(nout == N, $sformatf("%0d of %0d words read", nout, N));
    check(t_max > 5.0, "writer was held off while the FIFO was full");
    #1 check(!dout_v, "no output once empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #20000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
